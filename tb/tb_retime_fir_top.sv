// End-to-end testbench for retime_fir_top at its default size (128 taps,
// 16-bit samples and coefficients).
//
// A random sample stream with random gaps in in_valid is filtered by all three
// retimed variants at once. A reference model computes y(n) = sum_k a_k x(n-k)
// in 64-bit arithmetic from the accepted samples. Each variant's outputs are
// compared in order with the reference, and each must appear at its own fixed
// latency after the sample was accepted (2, 2 + ceil(log2 TAPS) and 3 clocks for
// the tabular, graphical-adder and graphical-multiplier variants). Six runs are
// made, each starting from reset and a coefficient load: a random filter; a
// filter whose coefficients and samples are mostly the most negative value
// (largest sums); and filters of 25, 60, 80 and 108 taps (the other lengths the
// paper's results cover) held in the 128-tap datapath with their other
// coefficients at zero. The first run stops without draining, so the second
// begins with a reset while outputs are in flight. Counted events, each of which
// must occur: input gaps while a sample is in flight, full-scale sums, outputs of
// every variant, resets, a reset mid-stream, coefficient loads and the short
// filters. Alongside, the example graph y = (a*b + c*d) * e gets random input
// sets, is checked against its own reference, and must both answer and hold its
// source off with in_ready.
module tb_retime_fir_top;

  import retime_fir_pkg::*;

  localparam int unsigned TAPS   = TAPS_DEF;
  localparam int unsigned DATA_W = DATA_W_DEF;
  localparam int unsigned COEF_W = COEF_W_DEF;
  localparam int unsigned ACC_W  = acc_width(DATA_W, COEF_W, TAPS);
  localparam int          LAT_TAB  = 2;
  localparam int          LAT_GADD = 2 + $clog2(TAPS);
  localparam int          LAT_GMUL = 3;
  localparam int          NSAMP    = 700;

  logic                     clk = 1'b0;
  logic                     rst_n;
  logic                     in_valid;
  logic                     coeff_load = 1'b0;
  logic signed [DATA_W-1:0] x;
  logic signed [COEF_W-1:0] coeff [TAPS];
  logic                     y_tab_valid, y_gadd_valid, y_gmul_valid;
  logic signed [ACC_W-1:0]  y_tab, y_gadd, y_gmul;
  logic                     ex_in_valid, ex_in_ready, ex_y_valid;
  logic signed [15:0]       ex_a, ex_b, ex_c, ex_d, ex_e;
  logic signed [48:0]       ex_y;

  int checks = 0;
  int failures = 0;
  int cyc = 0;

  // Event counters.
  int n_gaps = 0;
  int n_fullscale = 0;
  int n_out [3] = '{0, 0, 0};
  int n_resets = 0;
  int n_midreset = 0;
  int n_loads = 0;
  int n_short = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  retime_fir_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .coeff_load(coeff_load), .coeff(coeff),
    .y_tab_valid(y_tab_valid), .y_tab(y_tab),
    .y_gadd_valid(y_gadd_valid), .y_gadd(y_gadd),
    .y_gmul_valid(y_gmul_valid), .y_gmul(y_gmul),
    .ex_in_valid(ex_in_valid), .ex_in_ready(ex_in_ready),
    .ex_a(ex_a), .ex_b(ex_b), .ex_c(ex_c), .ex_d(ex_d), .ex_e(ex_e),
    .ex_y_valid(ex_y_valid), .ex_y(ex_y)
  );

  // Example graph: reference queue, fed while the filters run.
  longint ex_exp [$];
  int     n_ex_out = 0;
  int     n_ex_stall = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (ex_in_valid && ex_in_ready)
        ex_exp.push_back((longint'(ex_a) * longint'(ex_b) + longint'(ex_c) * longint'(ex_d))
                         * longint'(ex_e));
      if (ex_in_valid && !ex_in_ready) n_ex_stall++;
      if (ex_y_valid) begin
        n_ex_out++;
        checks++;
        if (ex_exp.size() == 0 || longint'(ex_y) != ex_exp.pop_front()) begin
          failures++;
          $display("FAIL: example graph output %0d", ex_y);
        end
      end
    end else begin
      ex_exp.delete();
    end
  end

  initial begin
    ex_in_valid = 1'b0;
    {ex_a, ex_b, ex_c, ex_d, ex_e} = '0;
    forever begin
      @(posedge clk);
      #1;
      if (!(ex_in_valid && !ex_in_ready)) begin
        ex_in_valid = ($urandom_range(0, 2) != 0);
        {ex_a, ex_b, ex_c, ex_d, ex_e} = 80'({$urandom, $urandom, $urandom});
      end
    end
  end

  longint hist [$];
  longint exp_y [3][$];
  int     exp_cyc [3][$];
  int     last_accept = -1000;
  localparam int LAT [3] = '{LAT_TAB, LAT_GADD, LAT_GMUL};
  localparam int SHORT [4] = '{25, 60, 80, 108};
  localparam longint FULL = longint'(1) << (DATA_W + COEF_W - 2);

  function automatic longint ref_out();
    longint s = 0;
    for (int k = 0; k < TAPS; k++)
      if (k < hist.size()) s += longint'(coeff[k]) * hist[hist.size() - 1 - k];
    return s;
  endfunction

  function automatic void check_out(int v, logic signed [ACC_W-1:0] y);
    n_out[v]++;
    checks += 2;
    if (exp_y[v].size() == 0) begin
      failures += 2;
      $display("FAIL: variant %0d output with nothing pending at cycle %0d", v, cyc);
    end else begin
      longint e;
      int     c;
      e = exp_y[v].pop_front();
      c = exp_cyc[v].pop_front();
      if (longint'(y) != e) begin
        failures++;
        if (failures < 10) $display("FAIL: variant %0d y=%0d expected %0d", v, y, e);
      end
      if (cyc - c != LAT[v]) begin
        failures++;
        if (failures < 10) $display("FAIL: variant %0d latency %0d expected %0d", v, cyc - c, LAT[v]);
      end
    end
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid) begin
        longint e;
        hist.push_back(longint'(x));
        e = ref_out();
        if (e >= FULL * 64) n_fullscale++;
        for (int v = 0; v < 3; v++) begin
          exp_y[v].push_back(e);
          exp_cyc[v].push_back(cyc);
        end
        last_accept = cyc;
      end else if (cyc - last_accept < LAT_GADD) begin
        n_gaps++;
      end
      if (y_tab_valid)  check_out(0, y_tab);
      if (y_gadd_valid) check_out(1, y_gadd);
      if (y_gmul_valid) check_out(2, y_gmul);
    end
  end

  // mode 0: random; 1: full-scale; 2: a short_taps-tap filter in the full datapath.
  task automatic run(input int mode, input bit drain, input int short_taps = 0);
    if (exp_y[1].size() != 0) n_midreset++;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    n_resets++;
    repeat (2) @(posedge clk);
    hist.delete();
    for (int v = 0; v < 3; v++) begin
      exp_y[v].delete();
      exp_cyc[v].delete();
    end
    for (int k = 0; k < TAPS; k++) begin
      case (mode)
        1:       coeff[k] = COEF_W'(1 << (COEF_W - 1));
        2:       coeff[k] = (k < short_taps) ? COEF_W'($urandom) : '0;
        default: coeff[k] = COEF_W'($urandom);
      endcase
    end
    if (mode == 2) n_short++;
    #1 rst_n = 1'b1;
    coeff_load = 1'b1;
    n_loads++;
    @(posedge clk);
    #1 coeff_load = 1'b0;
    for (int n = 0; n < NSAMP; n++) begin
      @(posedge clk);
      #1;
      in_valid = ($urandom_range(0, 4) != 0);
      if (mode == 1 && $urandom_range(0, 15) != 0) x = DATA_W'(1 << (DATA_W - 1));
      else                                         x = DATA_W'($urandom);
    end
    if (!drain) return;
    @(posedge clk);
    #1 in_valid = 1'b0;
    repeat (LAT_GADD + 3) @(posedge clk);
    checks++;
    for (int v = 0; v < 3; v++)
      if (exp_y[v].size() != 0) begin
        failures++;
        $display("FAIL: variant %0d has %0d outputs missing", v, exp_y[v].size());
      end
  endtask

  initial begin
    x = '0;
    // The first run ends without draining, so the second starts with a reset
    // in the middle of the stream; outputs in flight are dropped.
    run(0, 1'b0);
    run(1, 1'b1);
    // The shorter filter lengths of the paper's results.
    foreach (SHORT[i]) run(2, 1'b1, SHORT[i]);
    $display("events: gaps=%0d fullscale=%0d out_tab=%0d out_gadd=%0d out_gmul=%0d resets=%0d midreset=%0d loads=%0d short=%0d",
             n_gaps, n_fullscale, n_out[0], n_out[1], n_out[2], n_resets, n_midreset, n_loads, n_short);
    checks += 11;
    if (n_gaps == 0)      begin failures++; $display("FAIL: no input gap"); end
    if (n_fullscale == 0) begin failures++; $display("FAIL: no full-scale sum"); end
    if (n_out[0] == 0)    begin failures++; $display("FAIL: no tabular output"); end
    if (n_out[1] == 0)    begin failures++; $display("FAIL: no graphical-adder output"); end
    if (n_out[2] == 0)    begin failures++; $display("FAIL: no graphical-multiplier output"); end
    if (n_resets < 6)     begin failures++; $display("FAIL: resets not exercised"); end
    if (n_midreset == 0)  begin failures++; $display("FAIL: no reset mid-stream"); end
    if (n_loads < 6)      begin failures++; $display("FAIL: coefficient loads not exercised"); end
    if (n_ex_out == 0)    begin failures++; $display("FAIL: no example-graph output"); end
    if (n_ex_stall == 0)  begin failures++; $display("FAIL: example graph never stalled"); end
    if (n_short != 4)     begin failures++; $display("FAIL: short filters not all run"); end
    $display("example graph: outputs=%0d stalls=%0d", n_ex_out, n_ex_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
