// fpdiv_rem_cands: speculative radix-4 remainder step (one row of the
// remainder-calculation side of the digit cycle).
//
// From rem[i] = P - N and the scaled divisor z it forms, with one 3:2
// carry-save adder per digit value, the five candidates
//   rem[i+1] = 4*rem[i] - q*z,  q in {+2, +1, 0, -1, -2}
// all at once, so the digit only has to pick one afterwards.
// Per candidate the CSA adds 4P, ~(4N) and a divisor multiple T:
//   q > 0: T = ~(q*z) and the free carry LSB is set (completes -q*z)
//   q < 0: T = |q|*z,  q = 0: T = 0
// The new positive word is the CSA sum; the new negative word is the
// inverted CSA carry, so P' - N' = P' + ~N' + 1 equals the exact candidate.
// Outputs are indexed like the one-hot digit: [4]=+2 [3]=+1 [2]=0 [1]=-1 [0]=-2.
// Purely combinational; all arithmetic is modulo 2^REM_W.
module fpdiv_rem_cands
  import fpdiv_pkg::*;
(
  input  rem_t       p,
  input  rem_t       n,
  input  rem_t       z,
  output rem_t [4:0] cp,
  output rem_t [4:0] cn
);
  rem_t a, b;
  rem_t t [5];

  assign a = p << 2;
  assign b = ~(n << 2);

  always_comb begin
    t[4] = ~(z << 1);   // +2
    t[3] = ~z;          // +1
    t[2] = '0;          //  0
    t[1] = z;           // -1
    t[0] = z << 1;      // -2
    for (int k = 0; k < 5; k++) begin
      rem_t s, c;
      s = a ^ b ^ t[k];
      c = ((a & b) | (a & t[k]) | (b & t[k])) << 1;
      c[0] = (k >= 3);
      cp[k] = s;
      cn[k] = ~c;
    end
  end
endmodule
