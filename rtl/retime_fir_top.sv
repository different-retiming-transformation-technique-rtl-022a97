// Low-power retimed FIR filter: the three retiming variants side by side.
//
// One N-tap FIR filter, y(n) = sum_k a_k x(n-k), is built in the three retimed
// forms the paper proposes, each trading area, delay and power differently:
//   - fir_tabular_retime: registers on the diagonal accumulation path
//     (a transposed filter with a registered output);
//   - fir_gshift_adder:   samples held in place in a ring, coefficients rotating,
//                         registered products and a register-pipelined adder tree;
//   - fir_gshift_mult:    the same rings, registers moved inside two-stage
//                         multipliers, one adder into an output register.
// All three take the same sample stream and coefficient set and produce the same
// output sequence, each with its own latency. The incoming sample fans out to
// every multiplier of the tabular filter and every slot of the two sample
// rings, the highest fan-out net of the design, so a register is placed right
// before that net, as the paper recommends for high fan-out nodes (glitches of
// the input logic then stop at the register).
// Building all three variants in one top is this design's choice; the paper
// synthesises them as separate filters.
//
// Beside the filters, and unconnected to them, sits the paper's small example
// graph y = (a*b + c*d) * e whose two multiplications share one two-stage
// multiplier (dfg_shared_mult, ports ex_*).
//
// Interface: x with in_valid (at most one sample per clock, no back-pressure);
// coeff[k] is a_k. The tabular filter reads coeff directly, so it must be held
// stable while samples flow; the two graphical filters copy it into their
// rotating coefficient rings on a one-clock coeff_load pulse, which also clears
// their sample history. Load after reset, with no sample in the input register,
// before streaming. Each variant has its own output and valid.
// Timing, counted from the clock edge that accepts x(n): y_tab 2 clocks,
// y_gmul 3 clocks, y_gadd 2 + ceil(log2 TAPS) clocks (1 of each for the input
// register). The example graph takes a set every 2 clocks at most and answers
// 3 clocks after taking it.
module retime_fir_top
  import retime_fir_pkg::*;
#(
  parameter int unsigned TAPS   = TAPS_DEF,
  parameter int unsigned DATA_W = DATA_W_DEF,
  parameter int unsigned COEF_W = COEF_W_DEF,
  parameter int unsigned ACC_W  = acc_width(DATA_W, COEF_W, TAPS),
  parameter int unsigned EX_W   = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x,
  input  logic                     coeff_load,
  input  logic signed [COEF_W-1:0] coeff [TAPS],
  output logic                     y_tab_valid,
  output logic signed [ACC_W-1:0]  y_tab,
  output logic                     y_gadd_valid,
  output logic signed [ACC_W-1:0]  y_gadd,
  output logic                     y_gmul_valid,
  output logic signed [ACC_W-1:0]  y_gmul,
  // Example data-flow graph y = (a*b + c*d) * e, a separate circuit.
  input  logic                     ex_in_valid,
  output logic                     ex_in_ready,
  input  logic signed [EX_W-1:0]   ex_a,
  input  logic signed [EX_W-1:0]   ex_b,
  input  logic signed [EX_W-1:0]   ex_c,
  input  logic signed [EX_W-1:0]   ex_d,
  input  logic signed [EX_W-1:0]   ex_e,
  output logic                     ex_y_valid,
  output logic signed [3*EX_W:0]   ex_y
);

  // Register on the high fan-out input net.
  logic signed [DATA_W-1:0] x_q;
  logic                     x_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      x_v <= 1'b0;
    end else begin
      x_v <= in_valid;
      if (in_valid) x_q <= x;
    end
  end

  fir_tabular_retime #(
    .TAPS(TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W)
  ) u_tab (
    .clk(clk), .rst_n(rst_n), .in_valid(x_v), .x(x_q), .coeff(coeff),
    .out_valid(y_tab_valid), .y(y_tab)
  );

  fir_gshift_adder #(
    .TAPS(TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W)
  ) u_gadd (
    .clk(clk), .rst_n(rst_n), .in_valid(x_v), .x(x_q),
    .coeff_load(coeff_load), .coeff(coeff),
    .out_valid(y_gadd_valid), .y(y_gadd)
  );

  fir_gshift_mult #(
    .TAPS(TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W)
  ) u_gmul (
    .clk(clk), .rst_n(rst_n), .in_valid(x_v), .x(x_q),
    .coeff_load(coeff_load), .coeff(coeff),
    .out_valid(y_gmul_valid), .y(y_gmul)
  );

  dfg_shared_mult #(.W(EX_W)) u_ex (
    .clk(clk), .rst_n(rst_n), .in_valid(ex_in_valid), .in_ready(ex_in_ready),
    .a(ex_a), .b(ex_b), .c(ex_c), .d(ex_d), .e(ex_e),
    .out_valid(ex_y_valid), .y(ex_y)
  );

endmodule
