// Self-checking testbench for pipe_mult.
//
// Applies corner operands (0, +/-1, the most negative and most positive values,
// values that exercise only one half of each operand) and then random signed
// operands with random gaps in in_valid, at the default 16 x 16 size and with
// odd widths (7 x 9) where the halves are unequal. Each product is compared with
// a 64-bit product worked out in the testbench, one clock after the operands
// are accepted; p must also hold its value while in_valid is low.
module tb_pipe_mult;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  // Default-size instance.
  logic               v16, ov16;
  logic signed [15:0] a16, b16;
  logic signed [31:0] p16;
  pipe_mult dut16 (
    .clk(clk), .rst_n(rst_n), .in_valid(v16), .a(a16), .b(b16),
    .out_valid(ov16), .p(p16)
  );

  // Odd-width instance.
  logic              v7, ov7;
  logic signed [6:0] a7;
  logic signed [8:0] b7;
  logic signed [15:0] p7;
  pipe_mult #(.A_W(7), .B_W(9)) dut7 (
    .clk(clk), .rst_n(rst_n), .in_valid(v7), .a(a7), .b(b7),
    .out_valid(ov7), .p(p7)
  );

  longint exp16, exp7;
  bit     pend16, pend7;

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (ov16 != pend16) begin
        failures++;
        $display("FAIL: 16x16 out_valid=%0b expected %0b", ov16, pend16);
      end
      checks++;
      if (longint'(p16) != exp16) begin
        failures++;
        if (failures < 10) $display("FAIL: 16x16 p=%0d expected %0d", p16, exp16);
      end
      checks++;
      if (longint'(p7) != exp7) begin
        failures++;
        if (failures < 10) $display("FAIL: 7x9 p=%0d expected %0d", p7, exp7);
      end
      pend16 <= v16;
      pend7  <= v7;
      if (v16) exp16 <= longint'(a16) * longint'(b16);
      if (v7)  exp7  <= longint'(a7) * longint'(b7);
    end
  end

  localparam logic [15:0] CORNER [10] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000,
                                          16'h7FFF, 16'h00FF, 16'hFF00, 16'h0080,
                                          16'h8080, 16'h7F7F};

  initial begin
    rst_n = 1'b0;
    v16 = 1'b0; v7 = 1'b0;
    a16 = '0; b16 = '0; a7 = '0; b7 = '0;
    exp16 = 0; exp7 = 0; pend16 = 1'b0; pend7 = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    foreach (CORNER[i]) begin
      foreach (CORNER[j]) begin
        @(posedge clk);
        #1;
        v16 = 1'b1; a16 = CORNER[i]; b16 = CORNER[j];
        v7  = 1'b1; a7  = CORNER[i][6:0]; b7 = CORNER[j][8:0];
      end
    end
    for (int n = 0; n < 3000; n++) begin
      @(posedge clk);
      #1;
      v16 = ($urandom_range(0, 2) != 0);
      v7  = ($urandom_range(0, 2) != 0);
      a16 = 16'($urandom); b16 = 16'($urandom);
      a7  = 7'($urandom);  b7  = 9'($urandom);
    end
    @(posedge clk);
    #1 v16 = 1'b0; v7 = 1'b0;
    repeat (3) @(posedge clk);
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
