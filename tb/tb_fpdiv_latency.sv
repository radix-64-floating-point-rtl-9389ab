// tb_fpdiv_latency: the latency cases the design is specified by.
// Runs, for each format, divisions with normal operands and result and
// checks 4 (HP), 6 (SP) and 11 (DP) cycles; then the single precision case
// with one subnormal operand and a tiny result (E1 NM1 PS DGT x4 RND1 RND2,
// 9 cycles), the same with two subnormal operands and a normal result (9), and early
// termination (1). Every result is also compared with the reference model.
`timescale 1ns/1ps
module tb_fpdiv_latency;
  import fpdiv_pkg::*;
  import fpdiv_ref_pkg::*;

  logic        clk = 0, rst_n = 0, start = 0;
  fmt_e        fmt = FMT_DP;
  rm_e         rm = RM_RNE;
  logic [63:0] a = '0, b = '0;
  logic        ready, done;
  logic [63:0] result;
  fflags_t     flags;
  int checks = 0, failures = 0, cycles = 0;

  fpdiv u_dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles > 100000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic run(string name, fmt_e f, logic [63:0] x, logic [63:0] y, int exp_lat);
    ref_t r;
    int t0;
    r = ref_div(f, RM_RNE, x, y);
    while (!ready) @(posedge clk);
    @(negedge clk);
    fmt = f; rm = RM_RNE; a = x; b = y; start = 1;
    @(posedge clk);
    t0 = cycles;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    $display("%-34s latency %0d cycles (expected %0d)  result %h", name, cycles - t0, exp_lat, result);
    checks += 2;
    if (cycles - t0 != exp_lat) failures++;
    if (result !== r.result || flags !== r.flags) failures++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 50; i++) begin
      run("HP normal: 1.1 / 1.7",  FMT_HP, 16'h3C66, 16'h3ECD, 4);
      run("SP normal: pi / e",     FMT_SP, 32'h40490FDB, 32'h402DF854, 6);
      run("DP normal: 1 / 3",      FMT_DP, 64'h3FF0000000000000, 64'h4008000000000000, 11);
    end
    run("SP subnormal / normal, tiny result", FMT_SP, 32'h00012345, 32'h41200000, 9);
    run("SP subnormal / subnormal",           FMT_SP, 32'h00012345, 32'h00054321, 9);
    run("DP subnormal dividend",              FMT_DP, 64'h000123456789ABCD, 64'h3EB8000000000000, 13);
    run("DP 0 / 3 (early termination)",       FMT_DP, 64'h0, 64'h4008000000000000, 1);
    run("DP 6 / 4 (power of two divisor)",    FMT_DP, 64'h4018000000000000, 64'h4010000000000000, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
