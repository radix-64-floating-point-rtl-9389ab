// fpdiv_ref_pkg: reference model for the divider testbenches.
//
// Computes a correctly rounded IEEE 754 quotient for binary16/32/64 in any of
// the four rounding modes with plain integer arithmetic: the significands are
// normalized, a 128-bit integer division gives 64 or 65 quotient bits plus
// an exact remainder, and the result is rounded at the position the final
// exponent requires (subnormal results included). Tininess is taken before
// rounding. NaN handling matches the design: the first NaN operand, made
// quiet, else the default NaN. Also returns the latency the divider should
// show for the operation.
package fpdiv_ref_pkg;
  import fpdiv_pkg::*;

  typedef struct {
    logic [63:0] result;
    fflags_t     flags;
    int          latency;   // cycles until the result is written
    bit          early;
    bit          tiny;
    int          nsub;
  } ref_t;

  // Rounds the value qi * 2^(e - L) (qi has its leading one at bit L) to the
  // format; 'rnz' adds a nonzero tail below qi. Tininess before rounding.
  function automatic void ref_round(input fmt_e fmt, input rm_e rm, input bit sg, input int e,
                                  input logic [127:0] qi, input int L, input bit rnz,
                           output logic [63:0] result, output fflags_t flags,
                           output bit tiny);
    int fb, eb, bs, emin, emax, s;
    logic [127:0] kept;
    logic [63:0] allexp, packed_v;
    bit guard, sticky, inc;
    fb = frac_bits(fmt); eb = exp_bits(fmt); bs = bias(fmt);
    emin = 1 - bs; emax = bs;
    allexp = (64'd1 << eb) - 1;
    tiny = (e < emin);
    s = L - fb + ((e < emin) ? (emin - e) : 0);
    if (s > 100) begin
      kept = 0; guard = 0; sticky = 1;
    end else begin
      kept = qi >> s;
      guard = qi[s-1];
      sticky = ((qi & ((128'd1 << (s - 1)) - 1)) != 0) || rnz;
    end
    case (rm)
      RM_RNE: inc = guard & (sticky | kept[0]);
      RM_RTZ: inc = 0;
      RM_RUP: inc = !sg & (guard | sticky);
      default: inc = sg & (guard | sticky);
    endcase
    kept = kept + 128'(inc);
    packed_v = (64'(((e < emin) ? emin : e) + bs - 1) << fb) + kept[63:0];
    flags = '0;
    flags.nx = guard | sticky;
    flags.uf = tiny & (guard | sticky);
    if (e > emax || (packed_v >> fb) >= allexp) begin
      flags.of = 1; flags.nx = 1;
      result = overflow_result(fmt, rm, sg);
    end else begin
      result = packed_v | (64'(sg) << (fb + eb));
    end
  endfunction

  function automatic ref_t ref_div(fmt_e fmt, rm_e rm, logic [63:0] a, logic [63:0] b);
    ref_t  r;
    int    fb, eb, bs, emin, emax, ex, ed, e, L;
    logic [63:0] fx, fd, ea, eb_, mx, md, qbit, fmask, allexp;
    logic [127:0] num, qi, rm_;
    bit    sx, sd, sg, xnan, dnan, xs, ds, xinf, dinf, xz, dz;
    int    base[3] = '{4, 6, 11};
    fb = frac_bits(fmt); eb = exp_bits(fmt); bs = bias(fmt);
    emin = 1 - bs; emax = bs;
    fx = a & ((64'd1 << fb) - 1);
    fd = b & ((64'd1 << fb) - 1);
    ea = (a >> fb) & ((64'd1 << eb) - 1);
    eb_ = (b >> fb) & ((64'd1 << eb) - 1);
    sx = a[fb + eb]; sd = b[fb + eb]; sg = sx ^ sd;
    allexp = (64'd1 << eb) - 1;
    qbit = 64'd1 << (fb - 1);
    fmask = (64'd1 << (fb + eb + 1)) - 1;
    xnan = (ea == allexp) && fx != 0;  dnan = (eb_ == allexp) && fd != 0;
    xs = xnan && !fx[fb-1];            ds = dnan && !fd[fb-1];
    xinf = (ea == allexp) && fx == 0;  dinf = (eb_ == allexp) && fd == 0;
    xz = (ea == 0) && fx == 0;         dz = (eb_ == 0) && fd == 0;
    r.flags = '0; r.early = 1; r.tiny = 0; r.latency = 1;
    r.nsub = int'(ea == 0 && fx != 0) + int'(eb_ == 0 && fd != 0);
    if (xnan || dnan) begin
      r.result = ((xnan ? a : b) | qbit) & fmask;
      r.flags.nv = xs | ds;
      return r;
    end
    if ((xinf && dinf) || (xz && dz)) begin
      r.result = (allexp << fb) | qbit; r.flags.nv = 1; return r;
    end
    if (xinf || dz) begin
      r.result = (64'(sg) << (fb + eb)) | (allexp << fb); r.flags.dz = dz && !xinf; return r;
    end
    if (xz || dinf) begin
      r.result = 64'(sg) << (fb + eb); return r;
    end
    // finite, nonzero
    mx = (ea == 0) ? fx : (fx | (64'd1 << fb));
    md = (eb_ == 0) ? fd : (fd | (64'd1 << fb));
    ex = (ea == 0) ? emin : int'(ea) - bs;
    ed = (eb_ == 0) ? emin : int'(eb_) - bs;
    while (mx[fb] == 0) begin mx = mx << 1; ex--; end
    while (md[fb] == 0) begin md = md << 1; ed--; end
    num = 128'(mx) << 64;
    qi = num / 128'(md);
    rm_ = num % 128'(md);
    L = qi[64] ? 64 : 63;
    e = ex - ed + (L - 64);
    ref_round(fmt, rm, sg, e, qi, L, rm_ != 0, r.result, r.flags, r.tiny);
    // latency
    r.early = (r.nsub == 0) && (fd == 0) && !r.tiny && e <= emax;
    if (r.early) r.latency = 1;
    else r.latency = base[int'(fmt)] + ((r.nsub == 1) ? 2 : (r.nsub == 2) ? 3 : 0) + (r.tiny ? 1 : 0);
    return r;
  endfunction
endpackage
