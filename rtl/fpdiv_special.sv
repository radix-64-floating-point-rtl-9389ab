// fpdiv_special: early termination (E1 cycle).
//
// Decides whether a division can finish without digit iterations and, if so,
// gives its result and exception flags:
//   * a NaN operand: the dividend's NaN (else the divisor's) made quiet;
//     invalid if either operand is a signalling NaN
//   * inf/inf or 0/0: invalid, default NaN (positive, quiet bit only)
//   * inf/finite or finite/0: infinity (finite/0 also raises divide-by-zero)
//   * 0/nonzero or finite/inf: zero
//   * both operands normal and the divisor a power of two: the dividend's
//     fraction with the exponent reduced by the divisor's, when that exponent
//     is still in the normal range (otherwise the normal path is taken)
// The sign is always the XOR of the operand signs (except for NaNs).
// Purely combinational.
module fpdiv_special
  import fpdiv_pkg::*;
(
  input  fmt_e        fmt,
  input  logic [63:0] a,       // raw dividend
  input  logic [63:0] b,       // raw divisor
  input  operand_t    x,       // unpacked dividend
  input  operand_t    d,       // unpacked divisor
  output logic        early,   // result available now
  output logic        pow2,    // early because of a power-of-two divisor
  output logic [63:0] result,
  output fflags_t     flags
);
  always_comb begin
    int unsigned fb, eb;
    int signed   bs, er;
    logic        sgn;
    logic [63:0] qbit, fmask, inf_r, zero_r, dnan;
    fb     = frac_bits(fmt);
    eb     = exp_bits(fmt);
    bs     = bias(fmt);
    sgn    = x.sign ^ d.sign;
    qbit   = 64'd1 << (fb - 1);
    fmask  = (64'd1 << (fb + eb + 1)) - 64'd1;
    inf_r  = (((64'd1 << eb) - 64'd1) << fb) | (64'(sgn) << (eb + fb));
    zero_r = 64'(sgn) << (eb + fb);
    dnan   = (((64'd1 << eb) - 64'd1) << fb) | qbit;
    er     = int'(x.exp) - int'(d.exp);

    early  = 1'b1;
    pow2   = 1'b0;
    result = '0;
    flags  = '0;
    if (x.nan || d.nan) begin
      result   = ((x.nan ? a : b) | qbit) & fmask;
      flags.nv = x.snan | d.snan;
    end else if ((x.inf && d.inf) || (x.zero && d.zero)) begin
      result   = dnan;
      flags.nv = 1'b1;
    end else if (x.inf) begin
      result = inf_r;
    end else if (d.zero) begin
      result   = inf_r;
      flags.dz = 1'b1;
    end else if (x.zero || d.inf) begin
      result = zero_r;
    end else if (!x.sub && !d.sub && d.sig[SIG_W-2:0] == '0 &&
                 er >= 1 - bs && er <= bs) begin
      pow2   = 1'b1;
      result = zero_r | (64'(er + bs) << fb) |
               64'(x.sig[SIG_W-2:0] >> (52 - fb));
    end else begin
      early = 1'b0;
    end
  end
endmodule
