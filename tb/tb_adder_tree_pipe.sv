// Self-checking testbench for adder_tree_pipe.
//
// Runs trees of 1, 5 (odd operand counts at several levels) and 8 inputs on
// random signed operands with random gaps in in_valid. The testbench keeps a
// queue of expected sums with the clock at which each input set was accepted,
// and checks every sum and that it appears exactly ceil(log2 N) clocks later.
module tb_adder_tree_pipe;

  int checks = 0;
  int failures = 0;
  int cyc = 0;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  localparam int IN_W = 12;

  logic              v1, v5, v8;
  logic              ov1, ov5, ov8;
  logic signed [IN_W-1:0] d1 [1];
  logic signed [IN_W-1:0] d5 [5];
  logic signed [IN_W-1:0] d8 [8];
  logic signed [IN_W-1:0]   s1;
  logic signed [IN_W+2:0]   s5;
  logic signed [IN_W+2:0]   s8;

  adder_tree_pipe #(.N(1), .IN_W(IN_W)) t1 (
    .clk(clk), .rst_n(rst_n), .in_valid(v1), .din(d1), .out_valid(ov1), .sum(s1));
  adder_tree_pipe #(.N(5), .IN_W(IN_W)) t5 (
    .clk(clk), .rst_n(rst_n), .in_valid(v5), .din(d5), .out_valid(ov5), .sum(s5));
  adder_tree_pipe #(.N(8), .IN_W(IN_W)) t8 (
    .clk(clk), .rst_n(rst_n), .in_valid(v8), .din(d8), .out_valid(ov8), .sum(s8));

  longint q5 [$], q8 [$];
  int     c5 [$], c8 [$];

  always @(posedge clk) begin
    if (rst_n) begin
      // N = 1: no register levels, the sum is the input itself.
      if (v1) begin
        checks++;
        if (!ov1 || s1 != d1[0]) begin
          failures++;
          $display("FAIL: N=1 sum=%0d expected %0d", s1, d1[0]);
        end
      end
      if (v5) begin
        automatic longint s = 0;
        foreach (d5[i]) s += longint'(d5[i]);
        q5.push_back(s); c5.push_back(cyc);
      end
      if (v8) begin
        automatic longint s = 0;
        foreach (d8[i]) s += longint'(d8[i]);
        q8.push_back(s); c8.push_back(cyc);
      end
      if (ov5) begin
        checks += 2;
        if (q5.size() == 0) failures += 2;
        else begin
          automatic longint e5 = q5.pop_front();
          if (longint'(s5) != e5) begin
            failures++;
            if (failures < 5) $display("FAIL: N=5 sum=%0d expected %0d", s5, e5);
          end
          if (cyc - c5.pop_front() != 3) begin failures++; $display("FAIL: N=5 latency"); end
        end
      end
      if (ov8) begin
        checks += 2;
        if (q8.size() == 0) failures += 2;
        else begin
          automatic longint e8 = q8.pop_front();
          if (longint'(s8) != e8) begin
            failures++;
            if (failures < 5) $display("FAIL: N=8 sum=%0d expected %0d", s8, e8);
          end
          if (cyc - c8.pop_front() != 3) begin failures++; $display("FAIL: N=8 latency"); end
        end
      end
    end
  end

  initial begin
    rst_n = 1'b0;
    v1 = 1'b0; v5 = 1'b0; v8 = 1'b0;
    foreach (d1[i]) d1[i] = '0;
    foreach (d5[i]) d5[i] = '0;
    foreach (d8[i]) d8[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk);
      #1;
      v1 = $urandom_range(0, 1) == 1;
      v5 = $urandom_range(0, 3) != 0;
      v8 = $urandom_range(0, 3) != 0;
      foreach (d1[i]) d1[i] = IN_W'($urandom);
      foreach (d5[i]) d5[i] = (n < 50) ? IN_W'(1 << (IN_W - 1)) : IN_W'($urandom);
      foreach (d8[i]) d8[i] = (n < 50) ? IN_W'(1 << (IN_W - 1)) : IN_W'($urandom);
    end
    @(posedge clk);
    #1 begin v1 = 1'b0; v5 = 1'b0; v8 = 1'b0; end
    repeat (6) @(posedge clk);
    checks++;
    if (q5.size() != 0 || q8.size() != 0) begin
      failures++;
      $display("FAIL: sums missing");
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
