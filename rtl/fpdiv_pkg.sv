// fpdiv_pkg: types, constants and small helper functions shared by the
// radix-64 floating-point divider.
//
// The datapath is sized for double precision and reused for single and half
// precision, whose significands are left-aligned in the same 53-bit field.
// The partial remainder is kept as two words, a positive word P and a
// negative word N, whose difference P - N (modulo 2^REM_W) is the remainder.
// Both words use a fixed-point format with 3 integer bits (two's complement)
// and 56 fraction bits: 56 fraction bits hold the scaled operands exactly
// (53-bit significand halved, times a scale factor with 3 fraction bits) and
// 3 integer bits hold 4*rem, which lies in (-3, 3).
// A radix-4 quotient digit in {-2,-1,0,+1,+2} is carried one-hot.
package fpdiv_pkg;

  localparam int unsigned SIG_W   = 53;  // significand incl. hidden bit (DP)
  localparam int unsigned FRAC_W  = 56;  // fraction bits of the remainder words
  localparam int unsigned REM_W   = FRAC_W + 3;  // 3 integer + 56 fraction bits
  localparam int unsigned QUOT_W  = 56;  // 28 radix-4 digits: integer digit + 27
  localparam int unsigned EXP_W   = 13;  // signed unbiased exponent
  localparam int unsigned DIGITS_PER_CYCLE = 3;

  typedef enum logic [1:0] {
    FMT_HP = 2'd0,
    FMT_SP = 2'd1,
    FMT_DP = 2'd2
  } fmt_e;

  typedef enum logic [1:0] {
    RM_RNE = 2'd0,  // round to nearest, ties to even
    RM_RTZ = 2'd1,  // round toward zero
    RM_RUP = 2'd2,  // round toward +infinity
    RM_RDN = 2'd3   // round toward -infinity
  } rm_e;

  // One-hot quotient digit {qp2, qp1, qz, qn1, qn2}
  typedef struct packed {
    logic p2;
    logic p1;
    logic z;
    logic n1;
    logic n2;
  } qdigit_t;

  typedef logic [REM_W-1:0] rem_t;

  typedef struct packed {
    logic nv;  // invalid operation
    logic dz;  // division by zero
    logic of;  // overflow
    logic uf;  // underflow
    logic nx;  // inexact
  } fflags_t;

  // Unpacked operand. sig is left-aligned: sig[52] is the integer bit.
  // exp is unbiased; for a subnormal it is the minimum exponent of the format
  // and sig[52] is 0 until the operand is normalized.
  typedef struct packed {
    logic                        sign;
    logic signed [EXP_W-1:0]     exp;
    logic [SIG_W-1:0]            sig;
    logic                        zero;
    logic                        inf;
    logic                        nan;
    logic                        snan;
    logic                        sub;
  } operand_t;

  function automatic int unsigned frac_bits(fmt_e f);
    case (f)
      FMT_HP:  return 10;
      FMT_SP:  return 23;
      default: return 52;
    endcase
  endfunction

  function automatic int unsigned exp_bits(fmt_e f);
    case (f)
      FMT_HP:  return 5;
      FMT_SP:  return 8;
      default: return 11;
    endcase
  endfunction

  function automatic int signed bias(fmt_e f);
    case (f)
      FMT_HP:  return 15;
      FMT_SP:  return 127;
      default: return 1023;
    endcase
  endfunction

  // Radix-4 digits after the integer digit: ceil((frac bits + guard) / 2)
  function automatic int unsigned r4_digits(fmt_e f);
    case (f)
      FMT_HP:  return 6;
      FMT_SP:  return 12;
      default: return 27;
    endcase
  endfunction

  // Digit cycles (three radix-4 iterations each)
  function automatic int unsigned digit_cycles(fmt_e f);
    return (r4_digits(f) + DIGITS_PER_CYCLE - 1) / DIGITS_PER_CYCLE;
  endfunction

  // Round-up decision from the kept LSB, the guard bit and the sticky bit
  function automatic logic round_up(rm_e rm, logic sign, logic lsb, logic guard,
                                    logic sticky);
    case (rm)
      RM_RNE:  return guard & (sticky | lsb);
      RM_RTZ:  return 1'b0;
      RM_RUP:  return ~sign & (guard | sticky);
      default: return sign & (guard | sticky);
    endcase
  endfunction

  // Result of an overflow: infinity or the largest finite number
  function automatic logic [63:0] overflow_result(fmt_e f, rm_e rm, logic sign);
    logic [63:0] r;
    logic to_inf;
    int unsigned fb, eb;
    fb = frac_bits(f);
    eb = exp_bits(f);
    case (rm)
      RM_RNE:  to_inf = 1'b1;
      RM_RTZ:  to_inf = 1'b0;
      RM_RUP:  to_inf = ~sign;
      default: to_inf = sign;
    endcase
    r = ((64'd1 << eb) - 64'd1) << fb;        // infinity
    if (!to_inf) r = r - 64'd1;               // largest finite
    r = r | (64'(sign) << (eb + fb));
    return r;
  endfunction

endpackage
