// fpdiv_qsel: radix-4 quotient-digit selection (SELECT block).
//
// The input is a 6-bit two's complement estimate of 4*rem[i] with three
// integer and three fraction bits (units of 1/8). Because the divisor has been
// prescaled into [1-1/64, 1+1/8), the selection does not depend on the divisor.
// Intervals (in eighths), as specified for the standard selection function:
//   [13, 31] -> +2, [4, 12] -> +1, [-3, 3] -> 0, [-12, -4] -> -1, [-32, -13] -> -2
// The digit is produced one-hot as {qp2, qp1, qz, qn1, qn2}.
// Purely combinational.
module fpdiv_qsel
  import fpdiv_pkg::*;
(
  input  logic [5:0] est,  // estimate of 4*rem, signed, 1/8 units
  output qdigit_t    q
);
  logic signed [5:0] v;
  assign v = $signed(est);

  always_comb begin
    q = '0;
    if (v >= 6'sd13)       q.p2 = 1'b1;
    else if (v >= 6'sd4)   q.p1 = 1'b1;
    else if (v >= -6'sd3)  q.z  = 1'b1;
    else if (v >= -6'sd12) q.n1 = 1'b1;
    else                   q.n2 = 1'b1;
  end
endmodule
