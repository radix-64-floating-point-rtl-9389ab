// fpdiv_qsel_carry: modified radix-4 quotient-digit selection.
//
// Used for the second digit of a cycle. Its 6-bit estimate is the upper part
// of a 9-bit assimilation of the remainder in which the two's complement +1
// enters at the 9th MSB, not at the 6th. When no carry leaves the lower
// 3 bits, the 6-bit value is one unit (1/8) below the estimate the standard
// selection expects, so the interval end-points move according to that carry:
//   est = 31: carry 1 -> +2, carry 0 -> -2 (wrapped value 32/8)
//   [13,30] -> +2;  12: c=0 -> +2, c=1 -> +1;  [4,11] -> +1
//   3: c=0 -> +1, c=1 -> 0;  [-3,2] -> 0;  -4: c=0 -> 0, c=1 -> -1
//   [-12,-5] -> -1;  -13: c=0 -> -1, c=1 -> -2;  [-32,-14] -> -2
// Purely combinational; output one-hot {qp2, qp1, qz, qn1, qn2}.
module fpdiv_qsel_carry
  import fpdiv_pkg::*;
(
  input  logic [5:0] est,    // upper 6 bits of the 9-bit sum, 1/8 units
  input  logic       carry,  // carry from the lower 3 bits into the 6th MSB
  output qdigit_t    q
);
  logic signed [5:0] v;
  assign v = $signed(est);

  always_comb begin
    q = '0;
    if (v == 6'sd31) begin
      if (carry) q.p2 = 1'b1; else q.n2 = 1'b1;
    end else if (v >= 6'sd13) q.p2 = 1'b1;
    else if (v == 6'sd12) begin
      if (carry) q.p1 = 1'b1; else q.p2 = 1'b1;
    end else if (v >= 6'sd4) q.p1 = 1'b1;
    else if (v == 6'sd3) begin
      if (carry) q.z = 1'b1; else q.p1 = 1'b1;
    end else if (v >= -6'sd3) q.z = 1'b1;
    else if (v == -6'sd4) begin
      if (carry) q.n1 = 1'b1; else q.z = 1'b1;
    end else if (v >= -6'sd12) q.n1 = 1'b1;
    else if (v == -6'sd13) begin
      if (carry) q.n2 = 1'b1; else q.n1 = 1'b1;
    end else q.n2 = 1'b1;
  end
endmodule
