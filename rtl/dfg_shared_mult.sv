// Example data-flow graph y = (a*b + c*d) * e with its two first
// multiplications sharing one two-stage pipelined multiplier.
//
// The paper uses this small graph (vertices v1 = a*b, v2 = c*d, v3 = v1 + v2,
// v4 = v3 * e, and a register D at the output y(n)) to show cut-set retiming of
// the multiplication block, and notes that the two multiplications can share the
// two-stage pipeline multiplier. Here one pipe_mult is time-shared: in the clock
// that accepts an input set it starts a*b, in the next clock c*d. The register
// inside pipe_mult is the retimed cut-set. When a*b leaves the multiplier it is
// held in ab_q; when c*d leaves it one clock later, v3 = ab_q + c*d and
// v4 = v3 * e are formed and registered in the output register D. The operand
// schedule, the ready handshake and the word lengths are this design's choices.
//
// Interface: a..e with in_valid/in_ready (valid-ready: an input set is taken in
// a clock where both are high); y with out_valid, a one-clock pulse.
// Timing: one input set every 2 clocks at most (in_ready is low in the clock
// after an accept); y appears 3 clocks after the accepting clock.
module dfg_shared_mult #(
  parameter int unsigned W = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  input  logic signed [W-1:0]   c,
  input  logic signed [W-1:0]   d,
  input  logic signed [W-1:0]   e,
  output logic                  out_valid,
  output logic signed [3*W:0]   y
);

  // Which operand pair the shared multiplier takes this clock.
  typedef enum logic {PH_AB, PH_CD} phase_e;
  phase_e phase;

  logic                   accept;
  logic signed [W-1:0]    c_q, d_q, e_q;
  logic                   m_in_valid, m_out_valid;
  logic signed [W-1:0]    m_a, m_b;
  logic signed [2*W-1:0]  m_p;
  logic signed [2*W-1:0]  ab_q;
  logic                   ab_v;
  logic signed [2*W:0]    v3;
  logic signed [3*W:0]    v4;

  assign in_ready = (phase == PH_AB);
  assign accept   = in_valid && in_ready;

  always_comb begin
    if (phase == PH_AB) begin
      m_a        = a;
      m_b        = b;
      m_in_valid = accept;
    end else begin
      m_a        = c_q;
      m_b        = d_q;
      m_in_valid = 1'b1;
    end
  end

  pipe_mult #(.A_W(W), .B_W(W)) u_mul (
    .clk(clk), .rst_n(rst_n), .in_valid(m_in_valid), .a(m_a), .b(m_b),
    .out_valid(m_out_valid), .p(m_p)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_AB;
      c_q   <= '0;
      d_q   <= '0;
      e_q   <= '0;
      ab_q  <= '0;
      ab_v  <= 1'b0;
      y     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (accept) begin
        c_q   <= c;
        d_q   <= d;
        e_q   <= e;
        phase <= PH_CD;
      end else if (phase == PH_CD) begin
        phase <= PH_AB;
      end
      // The product leaving the multiplier while ab_v is low is a*b; the one
      // after it is c*d.
      if (m_out_valid && !ab_v) begin
        ab_q <= m_p;
        ab_v <= 1'b1;
      end else if (m_out_valid && ab_v) begin
        ab_v      <= 1'b0;
        y         <= v4;
        out_valid <= 1'b1;
      end
    end
  end

  always_comb begin
    v3 = (2*W+1)'(ab_q) + (2*W+1)'(m_p);
    v4 = v3 * e_q;
  end

  // The multiplier produces c*d in the clock right after a*b.
  a_pairing: assert property (@(posedge clk) ab_v |-> m_out_valid);

endmodule
