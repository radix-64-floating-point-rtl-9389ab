// tb_fpdiv_round2: checks the second rounding cycle for tiny results.
// For random unrounded fractions, remainder sticky bits and exponents below
// the normal range (down to far below the smallest subnormal), the result
// and flags must match the reference rounding, in all formats and modes,
// including the carry into the smallest normal number.
`timescale 1ns/1ps
module tb_fpdiv_round2;
  import fpdiv_pkg::*;
  import fpdiv_ref_pkg::*;
  fmt_e fmt;
  rm_e rm;
  logic sign, rem_nz;
  logic signed [12:0] exp_q;
  logic [53:0] frac;
  logic [63:0] result;
  fflags_t flags;
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

  fpdiv_round2 u_dut (.fmt(fmt), .rm(rm), .sign(sign), .exp_q(exp_q), .frac(frac),
                      .rem_nz(rem_nz), .result(result), .flags(flags));

  initial begin
    logic [127:0] t;
    logic [63:0] eres;
    fflags_t efl;
    bit etiny;
    int bs, e, fb;
    for (int i = 0; i < 40000; i++) begin
      fmt = fmt_e'($urandom_range(0, 2));
      rm = rm_e'($urandom_range(0, 3));
      sign = $urandom_range(0, 1);
      bs = bias(fmt);
      fb = frac_bits(fmt);
      frac = 54'({$urandom, $urandom});
      if (i % 4 == 0) frac = '1;
      rem_nz = $urandom_range(0, 1);
      e = (1 - bs) - 1 - $urandom_range(0, fb + 4);
      if (i % 16 == 0) e = (1 - bs) - $urandom_range(fb + 2, 200);
      exp_q = 13'(e);
      t = {73'd1, frac};
      #1;
      ref_round(fmt, rm, sign, e, t, 54, rem_nz, eres, efl, etiny);
      checks++;
      if (result !== eres || flags !== efl || !etiny) begin
        failures++;
        if (failures < 10) $display("fmt=%0d rm=%0d e=%0d got %h/%b exp %h/%b",
                                    fmt, rm, e, result, flags, eres, efl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
