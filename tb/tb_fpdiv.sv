// tb_fpdiv: end-to-end test of the divider at its default configuration.
//
// Runs random divisions in all three formats and all four rounding modes,
// drawn from operand classes that exercise every mechanism: normal operands
// (with x < d and x >= d, integer digit +1 and +2), subnormal operands
// (one and two normalization cycles), tiny results (second rounding cycle),
// overflow, power-of-two divisors and special operands (early termination).
// Each result and its flags are compared with fpdiv_ref_pkg, and the cycle
// count from start to the written result with the latency the design
// specifies. Counts how often each mechanism occurred; one that never
// occurred is a failure.
`timescale 1ns/1ps
module tb_fpdiv;
  import fpdiv_pkg::*;
  import fpdiv_ref_pkg::*;

  localparam int NTESTS = 200000;

  logic        clk = 0, rst_n = 0, start = 0;
  fmt_e        fmt = FMT_DP;
  rm_e         rm = RM_RNE;
  logic [63:0] a = '0, b = '0;
  logic        ready, done;
  logic [63:0] result;
  fflags_t     flags;

  fpdiv u_dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    #(40_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_early, n_pow2, n_nm1, n_nm2, n_rnd2, n_lt, n_q1two, n_of, n_ps_regs;
  int n_dig [5];
  int n_carry0, n_nm2_dut, n_exact;
  bit prev_nm_x;
  int n_fmt [3];
  int n_rm [4];
  always @(posedge clk) if (rst_n) begin
    if (u_dut.e1_early) n_early++;
    if (u_dut.e1_early && u_dut.pow2) n_pow2++;
    if (u_dut.nm_x || u_dut.nm_d) n_nm1++;
    if (u_dut.nm_d && prev_nm_x) n_nm2_dut++;
    prev_nm_x <= u_dut.nm_x;
    if (u_dut.rnd2) n_rnd2++;
    if (u_dut.ps_load && u_dut.ps_lt) n_lt++;
    if (u_dut.ps_load && u_dut.ps_q1_two) n_q1two++;
    if (u_dut.ps_regs) n_ps_regs++;
    if (u_dut.dgt) begin
      for (int k = 0; k < 5; k++)
        if (u_dut.dq1[k] || u_dut.dq2[k] || u_dut.dq3[k]) n_dig[k]++;
      if (!u_dut.u_digit.c9) n_carry0++;
    end
  end

  function automatic logic [63:0] gen(fmt_e f, int kind, int eoff);
    int fb, eb, bs;
    logic [63:0] fr, ex, v;
    fb = frac_bits(f); eb = exp_bits(f); bs = bias(f);
    fr = {$urandom, $urandom} & ((64'd1 << fb) - 1);
    case (kind)
      0: ex = 64'(bs + eoff);                                       // normal
      1: ex = 0;                                                    // subnormal
      2: begin ex = 0; fr = 0; end                                  // zero
      3: begin ex = (64'd1 << eb) - 1; fr = 0; end                  // infinity
      4: begin ex = (64'd1 << eb) - 1; if (fr == 0) fr = 1; end     // NaN
      5: begin ex = 64'(bs + eoff); fr = 0; end                     // power of 2
      default: ex = 64'($urandom_range(1, (1 << eb) - 2));
    endcase
    if (kind == 1 && fr == 0) fr = 1;
    if (kind == 1 && $urandom_range(0, 1) == 1) fr = fr >> $urandom_range(0, fb - 1);
    if (kind == 1 && fr == 0) fr = 1;
    v = (64'($urandom_range(0, 1)) << (fb + eb)) | (ex << fb) | fr;
    return v;
  endfunction

  task automatic run_one(fmt_e f, rm_e m, logic [63:0] x, logic [63:0] y);
    ref_t r;
    int t0, lat;
    r = ref_div(f, m, x, y);
    while (!ready) @(posedge clk);
    @(negedge clk);
    fmt = f; rm = m; a = x; b = y; start = 1;
    @(posedge clk);
    t0 = cycles;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    lat = cycles - t0;          // done is seen one cycle after the write
    checks++;
    if (result !== r.result || flags !== r.flags) begin
      failures++;
      if (failures < 20)
        $display("MISMATCH fmt=%0d rm=%0d a=%h b=%h got %h/%b exp %h/%b",
                 f, m, x, y, result, flags, r.result, r.flags);
    end
    checks++;
    if (lat != r.latency) begin
      failures++;
      if (failures < 20)
        $display("LATENCY fmt=%0d a=%h b=%h got %0d exp %0d", f, x, y, lat, r.latency);
    end
    if (r.flags.of) n_of++;
    if (r.nsub == 2) n_nm2++;
    if (!r.early && !r.flags.nx) n_exact++;
    n_fmt[int'(f)]++;
    n_rm[int'(m)]++;
  endtask

  initial begin
    fmt_e f;
    rm_e  m;
    int   kx, kd, eb, bs, ex, ed, sel;
    logic [63:0] x, y;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // directed: 1.5 / 1.25 in DP, one of each latency class
    run_one(FMT_DP, RM_RNE, 64'h3FF8000000000000, 64'h3FF4000000000000);
    run_one(FMT_SP, RM_RNE, 32'h3F800000, 32'h40400000);
    run_one(FMT_HP, RM_RNE, 16'h3C00, 16'h4200);
    for (int i = 0; i < NTESTS; i++) begin
      f  = fmt_e'($urandom_range(0, 2));
      m  = rm_e'($urandom_range(0, 3));
      eb = exp_bits(f); bs = bias(f);
      sel = $urandom_range(0, 99);
      kx = 0; kd = 0; ex = $urandom_range(0, 20) - 10; ed = $urandom_range(0, 20) - 10;
      if (sel < 55) begin kx = 0; kd = 0; end                         // normal
      else if (sel < 65) begin kx = 1; kd = 0; end                    // subnormal dividend
      else if (sel < 70) begin kx = 0; kd = 1; ed = -bs + 1 + $urandom_range(0, 3); end
      else if (sel < 74) begin kx = 1; kd = 1; end                    // both subnormal
      else if (sel < 80) begin kx = 0; kd = 0; ex = -bs + 1 + $urandom_range(0, 8);
                               ed = $urandom_range(0, 8); end         // tiny result
      else if (sel < 84) begin kx = 0; kd = 0; ex = bs - $urandom_range(0, 4);
                               ed = -$urandom_range(0, 4); end        // overflow
      else if (sel < 89) begin kx = 0; kd = 5; end                    // power of two
      else if (sel < 95) begin kx = $urandom_range(0, 4); kd = $urandom_range(0, 4); end
      else if (sel < 97) begin kx = 6; kd = 6; end                    // any bits
      else begin kx = 7; kd = 0; end                                  // exact quotient
      x = gen(f, kx == 7 ? 0 : kx, ex);
      y = gen(f, kd, ed);
      if (kx == 7) begin
        // x = y * k with y's low fraction bits cleared: the quotient is exactly k
        f = FMT_DP;
        y = gen(FMT_DP, 0, ed) & ~64'hFF;
        x = $realtobits($bitstoreal(y) * real'($urandom_range(3, 255)));
      end
      run_one(f, m, x, y);
    end
    // mechanism coverage
    $display("early=%0d pow2=%0d nm=%0d nm2=%0d ps_regs=%0d rnd2=%0d x<d=%0d q1=+2:%0d overflow=%0d carry0=%0d exact=%0d",
             n_early, n_pow2, n_nm1, n_nm2_dut, n_ps_regs, n_rnd2, n_lt, n_q1two, n_of, n_carry0, n_exact);
    $display("digits +2:%0d +1:%0d 0:%0d -1:%0d -2:%0d  fmt HP/SP/DP %0d/%0d/%0d",
             n_dig[4], n_dig[3], n_dig[2], n_dig[1], n_dig[0], n_fmt[0], n_fmt[1], n_fmt[2]);
    checks++;
    if (n_early == 0 || n_pow2 == 0 || n_nm1 == 0 || n_nm2 == 0 || n_nm2_dut == 0 || n_exact == 0 || n_ps_regs == 0 ||
        n_rnd2 == 0 || n_lt == 0 || n_q1two == 0 || n_of == 0 || n_carry0 == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (n_dig[k] == 0) begin failures++; $display("digit %0d never selected", k); end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_rm[k] == 0 || (k < 3 && n_fmt[k] == 0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
