// fpdiv_round2: second rounding cycle for tiny results (RND2).
//
// Used when the quotient exponent is below the normal range. The unrounded
// significand 1.frac from fpdiv_round1 is shifted right by the distance to
// the minimum exponent (bits shifted out join the sticky bit), then rounded
// with the exponent field at zero. A rounding carry out of the fraction lands
// in the exponent field and gives the smallest normal number, as IEEE 754
// requires. Tininess is detected before rounding: a tiny and inexact result
// raises underflow.
// Purely combinational. Results are packed in the low bits of 64.
module fpdiv_round2
  import fpdiv_pkg::*;
(
  input  fmt_e                     fmt,
  input  rm_e                      rm,
  input  logic                     sign,
  input  logic signed [EXP_W-1:0]  exp_q,    // unbiased exponent, below normal
  input  logic [53:0]              frac,     // unrounded fraction, 54 bits
  input  logic                     rem_nz,
  output logic [63:0]              result,
  output fflags_t                  flags
);
  always_comb begin
    int unsigned fb, eb;
    int signed   sh;
    logic [109:0] ext;
    logic [54:0]  hi;
    logic [53:0]  keep, smask;
    logic         g, st, inc;
    logic [63:0]  val;
    fb  = frac_bits(fmt);
    eb  = exp_bits(fmt);
    sh  = (1 - bias(fmt)) - int'(exp_q);    // >= 1 for a tiny result
    if (sh > 56) sh = 56;
    if (sh < 0)  sh = 0;
    ext   = {1'b1, frac, 55'd0} >> sh;
    hi    = ext[109:55];
    keep  = hi[53:0] >> (54 - fb);
    g     = hi[53 - fb];
    smask = (54'd1 << (53 - fb)) - 54'd1;
    st    = ((hi[53:0] & smask) != '0) | (ext[54:0] != '0) | rem_nz;
    inc   = round_up(rm, sign, keep[0], g, st);
    val   = 64'(keep) + 64'(inc);
    result   = val | (64'(sign) << (eb + fb));
    flags    = '0;
    flags.nx = g | st;
    flags.uf = g | st;
  end
endmodule
