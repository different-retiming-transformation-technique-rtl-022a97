// Sample circle and rotating coefficient circle of the graphical-shift filters.
//
// The paper draws an N-tap filter as two circles: the coefficients a_0..a_{N-1}
// on one, the samples on the other, and obtains each output by turning the
// coefficient circle one position and multiplying the circles position by
// position (products m_1..m_N). This block builds the two circles. Samples are
// written in place into a ring of N slots, at a write pointer that advances
// by one per sample, so stored samples never move. The coefficient circle is a
// ring of N registers that rotates by one position per sample, so slot j always
// meets the coefficient matching its sample's age:
//   coef[j] = a_((wp - j) mod N), where wp is the slot the next sample takes.
// The incoming sample reaches its slot's output in the same clock (tap[wp] = x)
// so products can be formed as the sample is accepted.
//
// coeff_load copies the coeff input into the coefficient ring and restarts the
// filter: the pointer returns to slot 0 and the stored samples are cleared.
// The ring-buffer reading of the circles, the load strobe and the reset to zero
// history are this design's choices.
//
// Interface: x with in_valid (no back-pressure); coeff/coeff_load as above.
// tap[j]/coef[j] are the operand pair of product j for the sample on x; they
// are meaningful in a clock where in_valid is high.
// Timing: all state changes on the clock edge that accepts the sample.
module gshift_ring #(
  parameter int unsigned TAPS   = 4,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned COEF_W = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x,
  input  logic                     coeff_load,
  input  logic signed [COEF_W-1:0] coeff [TAPS],
  output logic signed [DATA_W-1:0] tap   [TAPS],
  output logic signed [COEF_W-1:0] coef  [TAPS]
);

  localparam int unsigned PTR_W = (TAPS > 1) ? $clog2(TAPS) : 1;

  logic signed [DATA_W-1:0] ring [TAPS];
  logic signed [COEF_W-1:0] crot [TAPS];
  logic [PTR_W-1:0]         wp;

  always_comb begin
    for (int j = 0; j < TAPS; j++) begin
      tap[j]  = (PTR_W'(j) == wp) ? x : ring[j];
      coef[j] = crot[j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < TAPS; j++) begin
        ring[j] <= '0;
        crot[j] <= '0;
      end
      wp <= '0;
    end else if (coeff_load) begin
      // With wp = 0, slot j meets a_((0 - j) mod N).
      for (int j = 0; j < TAPS; j++) begin
        ring[j] <= '0;
        crot[j] <= coeff[(TAPS - j) % TAPS];
      end
      wp <= '0;
    end else if (in_valid) begin
      ring[wp] <= x;
      wp       <= (wp == PTR_W'(TAPS - 1)) ? '0 : wp + 1'b1;
      // Turn the coefficient circle one position.
      crot[0] <= crot[TAPS-1];
      for (int j = 1; j < TAPS; j++) crot[j] <= crot[j-1];
    end
  end

endmodule
