// fpdiv_round1: quotient assimilation and rounding (RND1 cycle).
//
// Forms the quotient Q = quot_pos - quot_neg and the final remainder
// P - N. A negative remainder means Q is one unit too large, so Q is
// decremented; a nonzero remainder sets the sticky bit. Q lies in [1,2) and
// holds 2 + 2k bits (k = 27, 12 or 6 radix-4 digits for DP, SP, HP); it is
// left-aligned to 54 fraction bits. The fraction of the format, the guard
// bit after it and the sticky bit give the rounding decision in one of the
// four IEEE rounding modes. The exponent field and fraction are added as one
// integer, so a rounding carry moves into the exponent; an exponent at or
// above the all-ones field is an overflow.
// If the exponent is below the normal range (tiny result), 'tiny' is set and
// the unrounded fraction and remainder sticky are passed on to fpdiv_round2.
// Purely combinational. Results are packed in the low bits of 64.
module fpdiv_round1
  import fpdiv_pkg::*;
(
  input  fmt_e                     fmt,
  input  rm_e                      rm,
  input  logic                     sign,
  input  logic signed [EXP_W-1:0]  exp_q,     // unbiased quotient exponent
  input  logic [QUOT_W-1:0]        quot_pos,
  input  logic [QUOT_W-1:0]        quot_neg,
  input  rem_t                     rem_p,
  input  rem_t                     rem_n,
  output logic [63:0]              result,
  output fflags_t                  flags,
  output logic                     tiny,
  output logic [53:0]              frac,      // unrounded fraction of Q
  output logic                     rem_nz     // remainder is not zero
);
  rem_t              rem;
  logic [QUOT_W-1:0] q, qc, qa;   // qa[55:54] is the integer part, always 01
  assign rem    = rem_p - rem_n;
  assign rem_nz = (rem != '0);
  assign q      = quot_pos - quot_neg;
  assign qc     = rem[REM_W-1] ? q - QUOT_W'(1) : q;
  assign qa     = qc << (54 - 2 * r4_digits(fmt));
  assign frac   = qa[53:0];

  always_comb begin
    int unsigned fb, eb;
    int signed   bs, ef;
    logic [53:0] keep, smask;
    logic        g, st, inc;
    logic [63:0] val;
    fb    = frac_bits(fmt);
    eb    = exp_bits(fmt);
    bs    = bias(fmt);
    ef    = int'(exp_q) + bs;               // biased exponent
    keep  = frac >> (54 - fb);
    g     = frac[53 - fb];
    smask = (54'd1 << (53 - fb)) - 54'd1;
    st    = ((frac & smask) != '0) | rem_nz;
    inc   = round_up(rm, sign, keep[0], g, st);
    tiny  = (ef < 1);
    val   = ((64'(ef) & 64'h7FF) << fb) + 64'(keep) + 64'(inc);
    flags    = '0;
    flags.nx = g | st;
    if (ef > 2 * bs || (val >> fb) >= ((64'd1 << eb) - 64'd1)) begin
      flags.of = 1'b1;
      flags.nx = 1'b1;
      result   = overflow_result(fmt, rm, sign);
    end else begin
      result = val | (64'(sign) << (eb + fb));
    end
  end
endmodule
