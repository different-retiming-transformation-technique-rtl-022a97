// Self-checking testbench for dfg_shared_mult.
//
// Offers random signed input sets (with bursts of the most negative value, the
// largest result) with in_valid mostly high, so the source is often held off by
// in_ready. Each input set that is taken goes into a queue with its expected
// y = (a*b + c*d) * e, computed in the testbench, and the clock it was taken.
// Every output is checked for value and for the 3-clock latency; in_ready must
// be low in the clock after every accept, so at most one set is taken per two
// clocks, and a long run of in_valid must be served at exactly that rate.
module tb_dfg_shared_mult;

  localparam int W = 16;

  int checks = 0;
  int failures = 0;
  int cyc = 0;
  int n_stall = 0;
  int n_accept = 0;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  logic                in_valid, in_ready, out_valid;
  logic signed [W-1:0] a, b, c, d, e;
  logic signed [3*W:0] y;

  dfg_shared_mult dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .a(a), .b(b), .c(c), .d(d), .e(e), .out_valid(out_valid), .y(y)
  );

  longint exp_y [$];
  int     exp_c [$];
  bit     accepted_last = 1'b0;
  int     burst_accepts = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (accepted_last) begin
        checks++;
        if (in_ready) begin
          failures++;
          $display("FAIL: in_ready high right after an accept");
        end
      end
      accepted_last <= in_valid && in_ready;
      if (in_valid && !in_ready) n_stall++;
      if (in_valid && in_ready) begin
        n_accept++;
        exp_y.push_back((longint'(a) * longint'(b) + longint'(c) * longint'(d)) * longint'(e));
        exp_c.push_back(cyc);
      end
      if (out_valid) begin
        checks += 2;
        if (exp_y.size() == 0) begin
          failures += 2;
          $display("FAIL: output with nothing pending");
        end else begin
          automatic longint ey = exp_y.pop_front();
          automatic int     ec = exp_c.pop_front();
          if (longint'(y) != ey) begin
            failures++;
            if (failures < 10) $display("FAIL: y=%0d expected %0d", y, ey);
          end
          if (cyc - ec != 3) begin
            failures++;
            if (failures < 10) $display("FAIL: latency %0d", cyc - ec);
          end
        end
      end
    end
  end

  function automatic logic signed [W-1:0] pick(bit extreme);
    return extreme ? W'(1 << (W - 1)) : W'($urandom);
  endfunction

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0;
    {a, b, c, d, e} = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      automatic bit ext = (n % 200) < 10;
      @(posedge clk);
      #1;
      // Hold the set while it waits for in_ready; otherwise offer a new one.
      if (!(in_valid && !in_ready)) begin
        in_valid = ($urandom_range(0, 4) != 0);
        a = pick(ext); b = pick(ext); c = pick(ext); d = pick(ext); e = pick(ext);
      end
    end
    // Throughput: 100 clocks of continuous in_valid take exactly 50 sets.
    @(posedge clk);
    #1 in_valid = 1'b0;
    repeat (5) @(posedge clk);
    burst_accepts = n_accept;
    #1 in_valid = 1'b1;
    repeat (100) @(posedge clk);
    #1 in_valid = 1'b0;
    checks++;
    if (n_accept - burst_accepts != 50) begin
      failures++;
      $display("FAIL: %0d sets in 100 clocks, expected 50", n_accept - burst_accepts);
    end
    repeat (6) @(posedge clk);
    checks += 2;
    if (exp_y.size() != 0) begin
      failures++;
      $display("FAIL: %0d outputs missing", exp_y.size());
    end
    if (n_stall == 0) begin
      failures++;
      $display("FAIL: in_ready never held off the source");
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
