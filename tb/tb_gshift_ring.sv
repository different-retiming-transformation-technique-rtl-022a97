// Self-checking testbench for gshift_ring.
//
// A 5-tap ring (so the write pointer wraps often) takes random samples with
// random gaps in in_valid, and coefficient loads both after reset and in the
// middle of the stream. In every clock that accepts a sample, the operand
// pairs (tap[j], coef[j]) must be the pairs (x(n-k), a_k) of the FIR sum in
// some order. Two weighted sums are compared with a reference built from the
// accepted-sample history: sum tap*coef, which is y(n), and sum tap*coef^2,
// which differs whenever a sample meets the wrong coefficient.
module tb_gshift_ring;

  localparam int TAPS = 5;
  localparam int W    = 16;

  int checks = 0;
  int failures = 0;
  int n_loads = 0;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic                in_valid, coeff_load;
  logic signed [W-1:0] x;
  logic signed [W-1:0] coeff [TAPS];
  logic signed [W-1:0] tap   [TAPS];
  logic signed [W-1:0] coef  [TAPS];

  gshift_ring #(.TAPS(TAPS), .DATA_W(W), .COEF_W(W)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
    .coeff_load(coeff_load), .coeff(coeff), .tap(tap), .coef(coef)
  );

  longint hist [$];
  longint a_ref [TAPS];

  always @(posedge clk) begin
    if (rst_n && coeff_load) begin
      hist.delete();
      foreach (coeff[k]) a_ref[k] = longint'(coeff[k]);
      n_loads++;
    end else if (rst_n && in_valid) begin
      automatic longint s1 = 0, s2 = 0, r1 = 0, r2 = 0;
      hist.push_back(longint'(x));
      for (int j = 0; j < TAPS; j++) begin
        s1 += longint'(tap[j]) * longint'(coef[j]);
        s2 += longint'(tap[j]) * longint'(coef[j]) * longint'(coef[j]);
      end
      for (int k = 0; k < TAPS; k++) begin
        if (k < hist.size()) begin
          r1 += hist[hist.size() - 1 - k] * a_ref[k];
          r2 += hist[hist.size() - 1 - k] * a_ref[k] * a_ref[k];
        end
      end
      checks += 2;
      if (s1 != r1) begin
        failures++;
        if (failures < 10) $display("FAIL: sum tap*coef=%0d expected %0d", s1, r1);
      end
      if (s2 != r2) begin
        failures++;
        if (failures < 10) $display("FAIL: sum tap*coef^2=%0d expected %0d", s2, r2);
      end
    end
  end

  task automatic load();
    foreach (coeff[k]) coeff[k] = W'($urandom_range(0, 4000)) - W'(2000);
    in_valid   = 1'b0;
    coeff_load = 1'b1;
    @(posedge clk);
    #1 coeff_load = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0;
    coeff_load = 1'b0;
    x = '0;
    foreach (coeff[k]) coeff[k] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    load();
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk);
      #1;
      if (n == 1000) load();
      in_valid = ($urandom_range(0, 3) != 0);
      x = W'($urandom_range(0, 4000)) - W'(2000);
    end
    @(posedge clk);
    #1 in_valid = 1'b0;
    @(posedge clk);
    checks++;
    if (n_loads != 2) begin
      failures++;
      $display("FAIL: %0d coefficient loads seen", n_loads);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
