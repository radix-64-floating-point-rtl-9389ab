// tb_fpdiv_ctrl: checks the cycle sequences of the sequencer.
// Drives start with random formats and cases (early termination, normal,
// subnormal dividend, subnormal divisor, both subnormal, tiny result), models
// the registered subnormal flags, and checks for each division: the number
// of cycles from start to the cycle that writes the result (1 for early;
// 4/6/11 for HP/SP/DP, +2 for one subnormal operand, +3 for two, +1 for a
// tiny result), the number of digit cycles (2/4/9), one NM cycle per
// subnormal operand with the dividend first, and one RND2 cycle only when
// the result is tiny.
`timescale 1ns/1ps
module tb_fpdiv_ctrl;
  import fpdiv_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, early = 0, any_sub = 0, tiny = 0;
  logic x_sub = 0, d_sub = 0;
  fmt_e fmt = FMT_DP;
  logic ready, e1_early, e1_save, nm_x, nm_d, ps_load, ps_regs, dgt, rnd1, rnd2, rnd_save, fin;
  int checks = 0, failures = 0;
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > 200000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  fpdiv_ctrl u_dut (.*);

  bit case_xs, case_ds, case_tiny;
  // registered subnormal flags, as the datapath keeps them
  always @(posedge clk) begin
    if (e1_save) begin x_sub <= case_xs; d_sub <= case_ds; end
    if (nm_x) x_sub <= 0;
    if (nm_d) d_sub <= 0;
  end
  always_comb tiny = rnd1 & case_tiny;

  initial begin
    int c, n, ndgt, nnx, nnd, nps, nr2, exp_l, order_ok;
    fmt_e f;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      f = fmt_e'($urandom_range(0, 2));
      c = $urandom_range(0, 4);
      case_tiny = $urandom_range(0, 1) && c != 0;
      case_xs = (c == 2 || c == 4);
      case_ds = (c == 3 || c == 4);
      @(negedge clk);
      checks++;
      if (!ready) failures++;
      fmt = f; start = 1; early = (c == 0); any_sub = case_xs | case_ds;
      n = 0; ndgt = 0; nnx = 0; nnd = 0; nps = 0; nr2 = 0; order_ok = 1;
      forever begin
        #1;
        n++;
        if (dgt) ndgt++;
        if (nm_x) nnx++;
        if (nm_d) begin nnd++; if (case_xs && nnx == 0) order_ok = 0; end
        if (ps_regs) nps++;
        if (rnd2) nr2++;
        if (fin) break;
        @(negedge clk);
        start = 0; early = 0; any_sub = 0;
        if (n > 40) break;
      end
      @(negedge clk);
      start = 0; early = 0; any_sub = 0;
      if (c == 0) exp_l = 1;
      else exp_l = ((f == FMT_HP) ? 4 : (f == FMT_SP) ? 6 : 11) +
                   ((case_xs && case_ds) ? 3 : (case_xs || case_ds) ? 2 : 0) + (case_tiny ? 1 : 0);
      checks++;
      if (n != exp_l) begin
        failures++;
        if (failures < 10) $display("fmt=%0d case=%0d tiny=%0d latency %0d exp %0d", f, c, case_tiny, n, exp_l);
      end
      checks++;
      if (c != 0 && (ndgt != int'(digit_cycles(f)) || nnx != int'(case_xs) ||
                     nnd != int'(case_ds) || nps != int'(case_xs | case_ds) ||
                     nr2 != int'(case_tiny) || !order_ok)) begin
        failures++;
        if (failures < 10) $display("sequence wrong fmt=%0d case=%0d", f, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
