// tb_fpdiv_round1: checks quotient assimilation and rounding of RND1.
// A random truncated quotient T in [1,2) with 2k fraction bits and a final
// remainder that is zero, positive or negative are encoded the way the
// digit iterations leave them: quot_pos - quot_neg = T (+1 when the
// remainder is negative) with random word splits. The result and flags must
// match the reference rounding of T with the remainder as sticky, for all
// formats and rounding modes, including overflow; tiny, frac and rem_nz must
// match too.
`timescale 1ns/1ps
module tb_fpdiv_round1;
  import fpdiv_pkg::*;
  import fpdiv_ref_pkg::*;
  fmt_e fmt;
  rm_e rm;
  logic sign, tiny, rem_nz;
  logic signed [12:0] exp_q;
  logic [55:0] qp, qn;
  rem_t rp, rn;
  logic [63:0] result;
  fflags_t flags;
  logic [53:0] frac;
  int checks = 0, failures = 0;
  logic clk = 0;
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > 1000000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  fpdiv_round1 u_dut (.fmt(fmt), .rm(rm), .sign(sign), .exp_q(exp_q), .quot_pos(qp),
                      .quot_neg(qn), .rem_p(rp), .rem_n(rn), .result(result),
                      .flags(flags), .tiny(tiny), .frac(frac), .rem_nz(rem_nz));

  initial begin
    logic [127:0] t;
    logic [63:0] eres;
    fflags_t efl;
    bit etiny;
    int k, bs, e, rc;
    logic [58:0] rv;
    for (int i = 0; i < 40000; i++) begin
      fmt = fmt_e'($urandom_range(0, 2));
      rm = rm_e'($urandom_range(0, 3));
      sign = $urandom_range(0, 1);
      k = r4_digits(fmt);
      bs = bias(fmt);
      t = (128'd1 << (2 * k)) | (128'({$urandom, $urandom}) & ((128'd1 << (2 * k)) - 1));
      if (i % 4 == 0) t = t | ((128'd1 << (2 * k)) - 1);      // all ones: carry out
      e = $urandom_range(0, 2 * bs + 2) - bs;                  // some tiny, some overflow
      rc = $urandom_range(0, 2);                               // 0 zero, 1 pos, 2 neg
      rv = 59'({$urandom, $urandom}) >> $urandom_range(3, 58);
      if (rv == 0) rv = 1;
      qn = {$urandom, $urandom};
      qp = 56'(t) + ((rc == 2) ? 56'd1 : 56'd0) + qn;
      rn = {$urandom, $urandom};
      rp = (rc == 0) ? rn : (rc == 1) ? rn + rv : rn - rv;
      exp_q = 13'(e);
      #1;
      ref_round(fmt, rm, sign, e, t, 2 * k, rc != 0, eres, efl, etiny);
      checks++;
      if (tiny !== etiny || rem_nz !== (rc != 0) ||
          frac !== 54'(t << (54 - 2 * k))) begin
        failures++;
        if (failures < 10) $display("tiny/frac mismatch fmt=%0d e=%0d", fmt, e);
      end
      if (!etiny) begin
        checks++;
        if (result !== eres || flags !== efl) begin
          failures++;
          if (failures < 10) $display("fmt=%0d rm=%0d e=%0d t=%h got %h/%b exp %h/%b",
                                      fmt, rm, e, t, result, flags, eres, efl);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
