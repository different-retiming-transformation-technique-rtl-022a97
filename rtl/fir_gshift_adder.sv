// Graphical-shift adder-retimed FIR filter.
//
// The paper draws the FIR as a circle of coefficients turned one position
// against a fixed circle of samples for each new output, producing the products
// m_1..m_N that are summed into y. Here the circles are gshift_ring: samples
// stay in place in a ring buffer and the coefficient ring rotates. Graphical
// shift adder retiming puts a register on every product (m_i followed by D) and
// then moves registers into the adder along cut-sets; the sum is formed by
// adder_tree_pipe, which has a register after each level of pairwise adds. The
// tree shape for more than four products, the handshake and the word lengths
// are this design's choices.
//
// Interface: x with in_valid (no back-pressure); y with out_valid. coeff is
// taken into the coefficient ring by a one-clock coeff_load pulse, which also
// clears the sample history; do this before streaming (at least once after
// reset, since the ring resets to zero coefficients).
// Timing: y = y(n) 1 + ceil(log2 TAPS) clocks after x(n) is accepted; one output
// per accepted sample. Registers load only when their inputs are valid.
module fir_gshift_adder
  import retime_fir_pkg::*;
#(
  parameter int unsigned TAPS   = TAPS_DEF,
  parameter int unsigned DATA_W = DATA_W_DEF,
  parameter int unsigned COEF_W = COEF_W_DEF,
  parameter int unsigned ACC_W  = acc_width(DATA_W, COEF_W, TAPS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x,
  input  logic                     coeff_load,
  input  logic signed [COEF_W-1:0] coeff [TAPS],
  output logic                     out_valid,
  output logic signed [ACC_W-1:0]  y
);

  localparam int unsigned PROD_W = DATA_W + COEF_W;

  logic                     accept;
  logic signed [DATA_W-1:0] tap  [TAPS];
  logic signed [COEF_W-1:0] coef [TAPS];
  logic signed [PROD_W-1:0] m_q  [TAPS];
  logic                     m_v;

  // A load restarts the filter; a sample offered in the same clock is dropped.
  assign accept = in_valid && !coeff_load;

  gshift_ring #(
    .TAPS(TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W)
  ) u_ring (
    .clk(clk), .rst_n(rst_n), .in_valid(accept), .x(x),
    .coeff_load(coeff_load), .coeff(coeff), .tap(tap), .coef(coef)
  );

  // Registered products m_j (the D on every product).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < TAPS; j++) m_q[j] <= '0;
      m_v <= 1'b0;
    end else begin
      m_v <= accept;
      if (accept) begin
        for (int j = 0; j < TAPS; j++) m_q[j] <= tap[j] * coef[j];
      end
    end
  end

  adder_tree_pipe #(
    .N    (TAPS),
    .IN_W (PROD_W),
    .OUT_W(ACC_W)
  ) u_tree (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (m_v),
    .din      (m_q),
    .out_valid(out_valid),
    .sum      (y)
  );

endmodule
