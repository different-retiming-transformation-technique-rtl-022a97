// Tabular-shift retimed FIR filter.
//
// The paper lays the FIR products out as a table: row k holds coefficient
// a_k, column i holds sample x(i), and each output y(n) is the sum along one
// diagonal (a_{N-1} x(n-N+1) + ... + a_0 x(n)). Tabular shift retiming places a
// register after every product-add node of that diagonal, the last one at the
// output. In hardware this is a transposed FIR filter: the new sample is
// broadcast to all N multipliers, and a chain of N registers carries the partial
// diagonal sums, r[N-1] <= a[N-1]*x and r[k] <= r[k+1] + a[k]*x, with y = r[0].
// The coefficient order along the chain follows the paper's table equations
// (a_0 multiplies the newest sample); the valid handshake, the reset to zero
// history and the word lengths are this design's choices.
//
// Interface: x with in_valid (one sample per clock at most, no back-pressure);
// coeff[k] is a_k and must be held stable while samples flow; y with out_valid.
// Timing: y = y(n) one clock after x(n) is accepted. Registers load only when
// in_valid is high, so gaps in the input stream do not disturb the filter.
module fir_tabular_retime
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
  input  logic signed [COEF_W-1:0] coeff [TAPS],
  output logic                     out_valid,
  output logic signed [ACC_W-1:0]  y
);

  localparam int unsigned PROD_W = DATA_W + COEF_W;

  logic signed [PROD_W-1:0] prod [TAPS];
  logic signed [ACC_W-1:0]  r    [TAPS];
  logic                     v_q;

  always_comb begin
    for (int k = 0; k < TAPS; k++) prod[k] = x * coeff[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) r[k] <= '0;
      v_q <= 1'b0;
    end else begin
      v_q <= in_valid;
      if (in_valid) begin
        for (int k = 0; k < TAPS - 1; k++) r[k] <= r[k+1] + ACC_W'(prod[k]);
        r[TAPS-1] <= ACC_W'(prod[TAPS-1]);
      end
    end
  end

  assign y         = r[0];
  assign out_valid = v_q;

endmodule
