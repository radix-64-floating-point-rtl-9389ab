// fpdiv_prescale: operand prescaling and integer quotient digit (PS cycle).
//
// Both significands (mx, md in [1,2), 53 bits) are viewed as md/2 in [0.5,1)
// and multiplied by a factor M = 1 + A + B chosen from three divisor bits
// (the bits after the leading 1) so that the scaled divisor z lies in
// [1-1/64, 1+1/8):
//   x1x2x3: 000 1+1/2+1/2 | 001 1+1/4+1/2 | 010 1+1/2+1/8 | 011 1+1/2
//           100 1+1/4+1/8 | 101 1+1/4     | 110 1+1/8     | 111 1+1/8
// Each product is the sum of the operand and two shifted copies, reduced by a
// 3:2 CSA and assimilated by a carry-propagate adder. In parallel a
// subtractor compares the unscaled significands; if mx < md the scaled
// dividend is doubled so that the quotient lies in [1,2).
// The integer quotient digit (+1 or +2) is chosen from the carry-save scaled
// dividend, once for the plain and once for the doubled dividend: +2 when the
// truncated sum of the two words is at least 1.5. The compare picks one.
// The first remainder is rem[1] = w - q1*z, kept as positive word w and
// negative word q1*z.
// Fixed-point format of all outputs: 3 integer and 56 fraction bits.
// Purely combinational.
module fpdiv_prescale
  import fpdiv_pkg::*;
(
  input  logic [SIG_W-1:0] mx,      // dividend significand, [1,2)
  input  logic [SIG_W-1:0] md,      // divisor significand, [1,2)
  output rem_t             z,       // scaled divisor
  output rem_t             rem_p,   // rem[1], positive word (scaled dividend)
  output rem_t             rem_n,   // rem[1], negative word (q1 * z)
  output logic             q1_two,  // integer digit is +2 (else +1)
  output logic             x_lt_d   // mx < md: dividend was doubled
);
  rem_t dp, xp;
  assign dp = {3'b000, md, 3'b000};   // md / 2
  assign xp = {3'b000, mx, 3'b000};   // mx / 2

  // Scale-factor terms from Table I, selected by the divisor bits
  logic [1:0] sel_a, sel_b;   // 0: >>1, 1: >>2 (A) or >>3 (B), 2: zero
  always_comb begin
    case (md[SIG_W-2 -: 3])
      3'b000:  begin sel_a = 2'd0; sel_b = 2'd0; end
      3'b001:  begin sel_a = 2'd1; sel_b = 2'd0; end
      3'b010:  begin sel_a = 2'd0; sel_b = 2'd1; end
      3'b011:  begin sel_a = 2'd0; sel_b = 2'd2; end
      3'b100:  begin sel_a = 2'd1; sel_b = 2'd1; end
      3'b101:  begin sel_a = 2'd1; sel_b = 2'd2; end
      default: begin sel_a = 2'd2; sel_b = 2'd1; end
    endcase
  end

  function automatic rem_t term_a(rem_t v, logic [1:0] s);
    case (s)
      2'd0:    return v >> 1;
      2'd1:    return v >> 2;
      default: return '0;
    endcase
  endfunction

  function automatic rem_t term_b(rem_t v, logic [1:0] s);
    case (s)
      2'd0:    return v >> 1;
      2'd1:    return v >> 3;
      default: return '0;
    endcase
  endfunction

  // Divisor: CSA then adder
  rem_t da, db, ds, dc;
  assign da = term_a(dp, sel_a);
  assign db = term_b(dp, sel_b);
  assign ds = dp ^ da ^ db;
  assign dc = ((dp & da) | (dp & db) | (da & db)) << 1;
  assign z  = ds + dc;

  // Dividend: CSA then adder
  rem_t xa, xb, xs, xc, w0;
  assign xa = term_a(xp, sel_a);
  assign xb = term_b(xp, sel_b);
  assign xs = xp ^ xa ^ xb;
  assign xc = ((xp & xa) | (xp & xb) | (xa & xb)) << 1;
  assign w0 = xs + xc;

  // Compare of the unscaled significands
  logic [SIG_W:0] diff;
  assign diff   = {1'b0, mx} - {1'b0, md};
  assign x_lt_d = diff[SIG_W];

  // Integer digit from the carry-save dividend, 2 integer + 5 fraction bits
  localparam logic [7:0] THREE_HALVES = 8'd48;   // 1.5 in units of 1/32
  logic [7:0] est_n, est_s;
  logic       two_n, two_s;
  assign est_n = xs[58:51] + xc[58:51];
  assign est_s = xs[57:50] + xc[57:50];
  assign two_n = (est_n >= THREE_HALVES);
  assign two_s = (est_s >= THREE_HALVES);
  assign q1_two = x_lt_d ? two_s : two_n;

  assign rem_p = x_lt_d ? (w0 << 1) : w0;
  assign rem_n = q1_two ? (z << 1) : z;
endmodule
