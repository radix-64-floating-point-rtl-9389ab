// fpdiv: radix-64 floating-point divider for half, single and double
// precision (IEEE 754 binary16/32/64), top level.
//
// The quotient is built 6 bits per clock by three radix-4 digit iterations
// per cycle (fpdiv_digit_cycle). Before the iterations both significands are
// prescaled so that the scaled divisor is close to 1, which makes digit
// selection independent of the divisor; the integer digit (+1 or +2) is
// found in the same cycle (fpdiv_prescale). Subnormal operands are
// normalized first (fpdiv_normalize), special operands and power-of-two
// divisors finish early (fpdiv_special), and the result is rounded in one
// cycle, or two when it is tiny (fpdiv_round1, fpdiv_round2).
//
// Interface: present a (dividend), b (divisor), fmt and rm with start=1 for
// one cycle while ready=1 (an assertion checks this). Operands and result
// sit in the low 16/32/64 bits; unused upper result bits are zero.
// Timing, counting the start cycle as cycle 1: the result is written at the
// end of cycle L and done=1 for one cycle in cycle L+1, where
//   L = 4 (HP), 6 (SP), 11 (DP) with normal operands and result,
//   +2 with one subnormal operand, +3 with two, +1 for a tiny result,
//   L = 1 for early termination.
// result and flags hold their value until the next division finishes.
// One division at a time (not pipelined).
// The pow2 flag of fpdiv_special and the rnd1 strobe of fpdiv_ctrl are left
// unconnected on purpose: a power-of-two quotient leaves through the same
// early path as special operands, and the RND1 result is the default choice
// when a division finishes. Lint also reports rst_n as both an asynchronous
// reset and a synchronous signal; the second use is only the 'disable iff'
// of the controller's assertions.
module fpdiv
  import fpdiv_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,     // asynchronous, active low
  input  logic        start,
  input  fmt_e        fmt,
  input  rm_e         rm,
  input  logic [63:0] a,         // dividend
  input  logic [63:0] b,         // divisor
  output logic        ready,
  output logic        done,
  output logic [63:0] result,
  output fflags_t     flags
);
  // ---- E1: unpack and early termination -----------------------------------
  operand_t ux, ud;
  fpdiv_unpack u_unpack_x (.fmt(fmt), .val(a), .op(ux));
  fpdiv_unpack u_unpack_d (.fmt(fmt), .val(b), .op(ud));

  logic        early, pow2;
  logic [63:0] sp_result;
  fflags_t     sp_flags;
  fpdiv_special u_special (
    .fmt(fmt), .a(a), .b(b), .x(ux), .d(ud),
    .early(early), .pow2(pow2), .result(sp_result), .flags(sp_flags)
  );

  // ---- control ------------------------------------------------------------
  fmt_e     fmt_r;
  rm_e      rm_r;
  logic     sign_r;
  operand_t x_r, d_r;
  logic     tiny;
  logic     e1_early, e1_save, nm_x, nm_d, ps_load, ps_regs, dgt;
  logic     rnd1, rnd2, rnd_save, fin;

  fpdiv_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start),
    .fmt(ready ? fmt : fmt_r),
    .early(early), .any_sub(ux.sub | ud.sub),
    .x_sub(x_r.sub), .d_sub(d_r.sub), .tiny(tiny),
    .ready(ready), .e1_early(e1_early), .e1_save(e1_save),
    .nm_x(nm_x), .nm_d(nm_d), .ps_load(ps_load), .ps_regs(ps_regs),
    .dgt(dgt), .rnd1(rnd1), .rnd2(rnd2), .rnd_save(rnd_save), .fin(fin)
  );

  // ---- NM: shared normalizer ----------------------------------------------
  operand_t nm_out;
  fpdiv_normalize u_norm (.op_i(nm_x ? x_r : d_r), .op_o(nm_out));

  // ---- PS: prescaling and integer digit -----------------------------------
  operand_t ps_x, ps_d;
  assign ps_x = ps_regs ? x_r : ux;
  assign ps_d = ps_regs ? d_r : ud;

  rem_t ps_z, ps_p, ps_n;
  logic ps_q1_two, ps_lt;
  fpdiv_prescale u_prescale (
    .mx(ps_x.sig), .md(ps_d.sig),
    .z(ps_z), .rem_p(ps_p), .rem_n(ps_n), .q1_two(ps_q1_two), .x_lt_d(ps_lt)
  );

  // ---- DGT: three radix-4 iterations per cycle ----------------------------
  rem_t    z_r, p_r, n_r, dc_p, dc_n;
  qdigit_t dq1, dq2, dq3;
  fpdiv_digit_cycle u_digit (
    .p(p_r), .n(n_r), .z(z_r), .p_o(dc_p), .n_o(dc_n),
    .q1(dq1), .q2(dq2), .q3(dq3)
  );

  logic [QUOT_W-1:0] quot_pos, quot_neg;
  fpdiv_quot_acc u_quot (
    .clk(clk), .rst_n(rst_n), .load(ps_load), .q1_two(ps_q1_two),
    .shift(dgt), .q1(dq1), .q2(dq2), .q3(dq3),
    .quot_pos(quot_pos), .quot_neg(quot_neg)
  );

  // ---- RND1 / RND2 --------------------------------------------------------
  logic signed [EXP_W-1:0] exp_r;
  logic [63:0] r1_result, r2_result;
  fflags_t     r1_flags, r2_flags;
  logic [53:0] r1_frac, frac_r;
  logic        r1_nz, nz_r;

  fpdiv_round1 u_round1 (
    .fmt(fmt_r), .rm(rm_r), .sign(sign_r), .exp_q(exp_r),
    .quot_pos(quot_pos), .quot_neg(quot_neg), .rem_p(p_r), .rem_n(n_r),
    .result(r1_result), .flags(r1_flags), .tiny(tiny),
    .frac(r1_frac), .rem_nz(r1_nz)
  );

  fpdiv_round2 u_round2 (
    .fmt(fmt_r), .rm(rm_r), .sign(sign_r), .exp_q(exp_r),
    .frac(frac_r), .rem_nz(nz_r), .result(r2_result), .flags(r2_flags)
  );

  // ---- registers ----------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fmt_r  <= FMT_DP;
      rm_r   <= RM_RNE;
      sign_r <= 1'b0;
      x_r    <= '0;
      d_r    <= '0;
      z_r    <= '0;
      p_r    <= '0;
      n_r    <= '0;
      exp_r  <= '0;
      frac_r <= '0;
      nz_r   <= 1'b0;
      result <= '0;
      flags  <= '0;
      done   <= 1'b0;
    end else begin
      if (ready && start) begin
        fmt_r  <= fmt;
        rm_r   <= rm;
        sign_r <= ux.sign ^ ud.sign;
      end
      if (e1_save) begin
        x_r <= ux;
        d_r <= ud;
      end
      if (nm_x) x_r <= nm_out;
      if (nm_d) d_r <= nm_out;
      if (ps_load) begin
        z_r   <= ps_z;
        p_r   <= ps_p;
        n_r   <= ps_n;
        exp_r <= ps_x.exp - ps_d.exp - EXP_W'(ps_lt);
      end else if (dgt) begin
        p_r <= dc_p;
        n_r <= dc_n;
      end
      if (rnd_save) begin
        frac_r <= r1_frac;
        nz_r   <= r1_nz;
      end
      done <= fin;
      if (fin) begin
        result <= e1_early ? sp_result : rnd2 ? r2_result : r1_result;
        flags  <= e1_early ? sp_flags  : rnd2 ? r2_flags  : r1_flags;
      end
    end
  end
endmodule
