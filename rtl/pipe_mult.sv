// Two-stage signed multiplier with a cut-set through its partial products.
//
// Each operand is split into a high half (signed) and a low half (unsigned),
// as the sub-word split of the retimed multiplication block in the paper
// (operand bit fields [3:2] and [1:0] feeding four small multipliers, with a
// cut-set line crossing them). Stage 1 forms the four half-word partial products
// and registers them: this register is the delay moved into the multiplier by
// retiming. Stage 2, combinational behind that register, shifts and adds the
// four partial products into the full product. The shift-and-add recombination
// and the signed/unsigned split are this design's choices.
//
// Interface: in_valid qualifies a and b; out_valid/p follow one clock later.
// Timing: latency 1 clock, one product per clock. The stage register loads only
// when in_valid is high, so p holds between valid samples.
module pipe_mult #(
  parameter int unsigned A_W = 16,
  parameter int unsigned B_W = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic signed [A_W-1:0]     a,
  input  logic signed [B_W-1:0]     b,
  output logic                      out_valid,
  output logic signed [A_W+B_W-1:0] p
);

  localparam int unsigned AL_W = A_W / 2;       // unsigned low half of a
  localparam int unsigned AH_W = A_W - AL_W;    // signed high half of a
  localparam int unsigned BL_W = B_W / 2;
  localparam int unsigned BH_W = B_W - BL_W;
  localparam int unsigned P_W  = A_W + B_W;

  // Operand halves; low halves get a zero sign bit so signed products stay exact.
  logic signed [AH_W-1:0] a_hi;
  logic signed [AL_W:0]   a_lo;
  logic signed [BH_W-1:0] b_hi;
  logic signed [BL_W:0]   b_lo;

  assign a_hi = a[A_W-1:AL_W];
  assign a_lo = {1'b0, a[AL_W-1:0]};
  assign b_hi = b[B_W-1:BL_W];
  assign b_lo = {1'b0, b[BL_W-1:0]};

  // Stage-1 partial products (registered at the cut-set).
  logic signed [AH_W+BH_W-1:0]   pp_hh_d, pp_hh_q;
  logic signed [AH_W+BL_W:0]     pp_hl_d, pp_hl_q;
  logic signed [AL_W+BH_W:0]     pp_lh_d, pp_lh_q;
  logic signed [AL_W+BL_W+1:0]   pp_ll_d, pp_ll_q;
  logic                          v_q;

  always_comb begin
    pp_hh_d = a_hi * b_hi;
    pp_hl_d = a_hi * b_lo;
    pp_lh_d = a_lo * b_hi;
    pp_ll_d = a_lo * b_lo;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pp_hh_q <= '0;
      pp_hl_q <= '0;
      pp_lh_q <= '0;
      pp_ll_q <= '0;
      v_q     <= 1'b0;
    end else begin
      v_q <= in_valid;
      if (in_valid) begin
        pp_hh_q <= pp_hh_d;
        pp_hl_q <= pp_hl_d;
        pp_lh_q <= pp_lh_d;
        pp_ll_q <= pp_ll_d;
      end
    end
  end

  // Stage 2: weight each partial product by its half offsets and add.
  logic signed [P_W-1:0] t_hh, t_hl, t_lh, t_ll;

  always_comb begin
    t_hh = P_W'(pp_hh_q) <<< (AL_W + BL_W);
    t_hl = P_W'(pp_hl_q) <<< AL_W;
    t_lh = P_W'(pp_lh_q) <<< BL_W;
    t_ll = P_W'(pp_ll_q);
    p    = t_hh + t_hl + t_lh + t_ll;
  end

  assign out_valid = v_q;

endmodule
