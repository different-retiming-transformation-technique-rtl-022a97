// Self-checking testbench for fir_gshift_adder.
//
// The coefficients are taken into the filter's coefficient ring by a coeff_load pulse after each reset.
// Drives a 7-tap instance with random signed samples and random gaps in
// in_valid, in two phases separated by a reset: random coefficients, then every
// coefficient and most samples at the most negative value (largest possible
// sum, to catch accumulator overflow). Filters with a coefficient ring get a
// third phase: new coefficients loaded in the middle of a stream, without
// reset, which must restart the filter while outputs are still in flight. A reference model keeps the accepted
// sample history and computes y(n) = sum_k a_k x(n-k) in 64-bit arithmetic.
// Every output is compared with it, and the number of clocks between accepting
// x(n) and seeing y(n) is checked against the expected latency of 4.
module tb_fir_gshift_adder;

  localparam int unsigned TAPS   = 7;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned COEF_W = 16;
  localparam int unsigned ACC_W  = DATA_W + COEF_W + $clog2(TAPS);
  localparam int          LAT    = 4;
  localparam int          NSAMP  = 600;
  localparam bit          HAS_LOAD = 1'b1;

  logic                     clk = 1'b0;
  logic                     rst_n;
  logic                     in_valid;
  logic                     coeff_load;
  logic signed [DATA_W-1:0] x;
  logic signed [COEF_W-1:0] coeff [TAPS];
  logic                     out_valid;
  logic signed [ACC_W-1:0]  y;

  int checks = 0;
  int failures = 0;
  int cyc = 0;
  int outputs_seen = 0;
  int n_reloads = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  fir_gshift_adder #(
    .TAPS(TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W)
  ) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .coeff_load(coeff_load), .coeff(coeff),
    .out_valid(out_valid), .y(y)
  );

  // Reference model.
  longint hist [$];
  longint exp_y [$];
  int     exp_cyc [$];

  function automatic longint ref_out();
    longint s = 0;
    for (int k = 0; k < TAPS; k++)
      if (k < hist.size()) s += longint'(coeff[k]) * hist[hist.size() - 1 - k];
    return s;
  endfunction

  always @(posedge clk) begin
    if (rst_n && HAS_LOAD && coeff_load) begin
      hist.delete();
      n_reloads++;
    end else if (rst_n && in_valid) begin
      hist.push_back(longint'(x));
      exp_y.push_back(ref_out());
      exp_cyc.push_back(cyc);
    end
    if (rst_n && out_valid) begin
      outputs_seen++;
      checks++;
      if (exp_y.size() == 0) begin
        failures++;
        $display("FAIL: output with no sample pending at cycle %0d", cyc);
      end else begin
        longint e;
        int     c;
        e = exp_y.pop_front();
        c = exp_cyc.pop_front();
        if (longint'(y) != e) begin
          failures++;
          if (failures < 10) $display("FAIL: y=%0d expected %0d at cycle %0d", y, e, cyc);
        end
        checks++;
        if (cyc - c != LAT) begin
          failures++;
          if (failures < 10) $display("FAIL: latency %0d expected %0d", cyc - c, LAT);
        end
      end
    end
  end

  task automatic run_phase(input bit extreme, input bit reload = 1'b0);
    if (!reload) begin
      rst_n      = 1'b0;
      in_valid   = 1'b0;
      coeff_load = 1'b0;
      x          = '0;
      hist.delete();
      exp_y.delete();
      exp_cyc.delete();
    end
    for (int k = 0; k < TAPS; k++)
      coeff[k] = extreme ? COEF_W'(1 << (COEF_W - 1)) : COEF_W'($urandom);
    if (!reload) begin
      repeat (3) @(posedge clk);
      #1 rst_n = 1'b1;
    end
    // Take the coefficients in (used by the filters with a coefficient ring).
    // On a reload the samples still in flight must come out unchanged.
    in_valid   = 1'b0;
    coeff_load = 1'b1;
    @(posedge clk);
    #1 coeff_load = 1'b0;
    for (int n = 0; n < NSAMP; n++) begin
      @(posedge clk);
      #1;
      in_valid = ($urandom_range(0, 3) != 0);
      if (extreme) x = ($urandom_range(0, 7) != 0) ? DATA_W'(1 << (DATA_W - 1)) : DATA_W'($urandom);
      else         x = DATA_W'($urandom);
    end
    if (HAS_LOAD && extreme) return;  // the reload phase follows mid-stream
    @(posedge clk);
    #1 in_valid = 1'b0;
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (exp_y.size() != 0) begin
      failures++;
      $display("FAIL: %0d outputs missing", exp_y.size());
    end
  endtask

  initial begin
    run_phase(1'b0);
    run_phase(1'b1);
    if (HAS_LOAD) begin
      // New coefficients mid-stream, without reset: the filter restarts.
      run_phase(1'b0, 1'b1);
      checks++;
      if (n_reloads < 3) begin
        failures++;
        $display("FAIL: reload not seen");
      end
    end
    checks++;
    if (outputs_seen < NSAMP) begin
      failures++;
      $display("FAIL: only %0d outputs", outputs_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
