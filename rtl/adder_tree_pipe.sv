// Pipelined binary adder tree: the adder block of the graphical-shift filter
// with its delays retimed into the tree.
//
// The paper splits the ring of products m1..m4 with a cut-set into the
// sub-graphs {m1,m2} and {m3,m4} and moves k registers across that cut-set
// (its equations for w_r(G_m1m2 -> G_m3m4)). Applied at every level of a binary
// tree this gives one register after each level of pairwise adds. How the cut is
// repeated for more than four products is this design's own generalisation.
//
// Interface: N signed inputs of IN_W bits qualified by in_valid; one signed sum
// of OUT_W bits with out_valid. Pairs (2j, 2j+1) are added; an odd last element
// passes to the next level unchanged but still registered.
// Timing: latency LEVELS = ceil(log2 N) clocks, one sum per clock. Each level's
// register loads only when that level's input is valid.
module adder_tree_pipe #(
  parameter int unsigned N     = 4,
  parameter int unsigned IN_W  = 32,
  parameter int unsigned OUT_W = IN_W + ((N > 1) ? $clog2(N) : 0)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  din [N],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] sum
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;

  // Number of operands at level l (level 0 = the inputs).
  function automatic int unsigned count_at(int unsigned l);
    int unsigned c;
    c = N;
    for (int unsigned i = 0; i < l; i++) c = (c + 1) / 2;
    return c;
  endfunction

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned CNT = count_at(l);
    logic signed [OUT_W-1:0] v [CNT];
    logic                    vld;

    if (l == 0) begin : g_in
      for (genvar j = 0; j < CNT; j++) begin : g_ext
        assign v[j] = OUT_W'(din[j]);
      end
      assign vld = in_valid;
    end else begin : g_stage
      localparam int unsigned PCNT = count_at(l - 1);
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          vld <= 1'b0;
          for (int j = 0; j < CNT; j++) v[j] <= '0;
        end else begin
          vld <= g_lvl[l-1].vld;
          if (g_lvl[l-1].vld) begin
            for (int j = 0; j < CNT; j++) begin
              if (2 * j + 1 < PCNT) v[j] <= g_lvl[l-1].v[2*j] + g_lvl[l-1].v[2*j+1];
              else                  v[j] <= g_lvl[l-1].v[2*j];
            end
          end
        end
      end
    end
  end

  assign sum       = g_lvl[LEVELS].v[0];
  assign out_valid = g_lvl[LEVELS].vld;

endmodule
