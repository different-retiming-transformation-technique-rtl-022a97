// Graphical-shift multiplier-retimed FIR filter.
//
// Same circles as the adder-retimed variant (gshift_ring: samples in place in a
// ring buffer, coefficient ring rotating one position per sample), but the
// registers on the products m_1..m_N are moved into the multipliers themselves.
// Each product is formed by pipe_mult, whose register sits between its sub-word
// partial products and their summation; the paper places the retimed register
// inside the multiplier this way. The N products are then added in one
// combinational adder into the output register D. Where the adder's registers
// go (here only at its output), the handshake and the word lengths are this
// design's choices.
//
// Interface: x with in_valid (no back-pressure); y with out_valid. coeff is
// taken into the coefficient ring by a one-clock coeff_load pulse, which also
// clears the sample history; do this before streaming (at least once after
// reset, since the ring resets to zero coefficients).
// Timing: y = y(n) two clocks after x(n) is accepted, one output per sample.
module fir_gshift_mult
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
  logic signed [PROD_W-1:0] p    [TAPS];
  logic                     p_v  [TAPS];
  logic signed [ACC_W-1:0]  sum;
  logic                     v_q;
  logic signed [ACC_W-1:0]  y_q;

  // A load restarts the filter; a sample offered in the same clock is dropped.
  assign accept = in_valid && !coeff_load;

  gshift_ring #(
    .TAPS(TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W)
  ) u_ring (
    .clk(clk), .rst_n(rst_n), .in_valid(accept), .x(x),
    .coeff_load(coeff_load), .coeff(coeff), .tap(tap), .coef(coef)
  );

  for (genvar j = 0; j < TAPS; j++) begin : g_mul
    pipe_mult #(
      .A_W(DATA_W),
      .B_W(COEF_W)
    ) u_mul (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (accept),
      .a        (tap[j]),
      .b        (coef[j]),
      .out_valid(p_v[j]),
      .p        (p[j])
    );
  end

  always_comb begin
    sum = '0;
    for (int j = 0; j < TAPS; j++) sum += ACC_W'(p[j]);
  end

  // Output register D. All multipliers share one valid; slot 0's is used.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_q <= '0;
      v_q <= 1'b0;
    end else begin
      v_q <= p_v[0];
      if (p_v[0]) y_q <= sum;
    end
  end

  assign y         = y_q;
  assign out_valid = v_q;

endmodule
