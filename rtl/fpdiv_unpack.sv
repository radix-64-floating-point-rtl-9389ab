// fpdiv_unpack: operand unpacking and classification (part of the E1 cycle).
//
// Splits a half, single or double precision value (held in the low bits of a
// 64-bit word) into sign, unbiased exponent and a significand left-aligned
// in a 53-bit field with the integer bit at bit 52, and flags zero, infinity,
// NaN, signalling NaN and subnormal. A subnormal gets the format's minimum
// exponent and integer bit 0; fpdiv_normalize completes it later.
// Purely combinational.
module fpdiv_unpack
  import fpdiv_pkg::*;
(
  input  fmt_e        fmt,
  input  logic [63:0] val,
  output operand_t    op
);
  always_comb begin
    logic [10:0] e;
    logic [51:0] f;    // fraction, left-aligned to 52 bits
    logic        s;
    int signed   b;
    case (fmt)
      FMT_HP: begin
        s = val[15];
        e = {6'd0, val[14:10]};
        f = {val[9:0], 42'd0};
      end
      FMT_SP: begin
        s = val[31];
        e = {3'd0, val[30:23]};
        f = {val[22:0], 29'd0};
      end
      default: begin
        s = val[63];
        e = val[62:52];
        f = val[51:0];
      end
    endcase
    b = bias(fmt);
    op      = '0;
    op.sign = s;
    if (e == 11'((1 << exp_bits(fmt)) - 1)) begin
      op.inf  = (f == '0);
      op.nan  = (f != '0);
      op.snan = (f != '0) && !f[51];
      op.sig  = {1'b1, f};
      op.exp  = EXP_W'(b + 1);
    end else if (e == '0) begin
      op.zero = (f == '0);
      op.sub  = (f != '0);
      op.sig  = {1'b0, f};
      op.exp  = EXP_W'(1 - b);
    end else begin
      op.sig  = {1'b1, f};
      op.exp  = EXP_W'(int'(e) - b);
    end
  end
endmodule
