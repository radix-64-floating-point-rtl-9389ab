// fpdiv_normalize: normalization of a subnormal operand (one NM cycle).
//
// Counts the leading zeros of the 53-bit significand, shifts it left until
// the integer bit is 1 and lowers the exponent by the same amount, so the
// operand lies in [1,2) before it is prescaled. One normalizer is shared by
// both operands; the controller uses it once per subnormal operand.
// A zero significand is passed through unchanged (zeros never reach it).
// Purely combinational.
module fpdiv_normalize
  import fpdiv_pkg::*;
(
  input  operand_t op_i,
  output operand_t op_o
);
  logic [5:0] lz;
  always_comb begin
    lz = '0;
    for (int i = 0; i < SIG_W; i++)
      if (op_i.sig[i]) lz = 6'(SIG_W - 1 - i);
  end

  always_comb begin
    op_o = op_i;
    if (op_i.sig != '0) begin
      op_o.sig = op_i.sig << lz;
      op_o.exp = op_i.exp - EXP_W'(lz);
      op_o.sub = 1'b0;
    end
  end
endmodule
