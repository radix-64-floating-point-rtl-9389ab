// fpdiv_digit_cycle: one digit cycle = three radix-4 iterations (6 quotient
// bits), built with speculation between the iterations.
//
// Digit selection side:
//  * q[i+1]: a 6-bit adder assimilates the 6 MSBs of 4*rem[i] (P + ~N + 1)
//    and the standard selection (fpdiv_qsel) picks the digit.
//  * q[i+2]: for each of the five speculative rem[i+1] the 9 MSBs of
//    4*rem[i+1] are assimilated by a 9-bit adder split into a 3-bit low part
//    and a 6-bit high part; q[i+1] picks one 9-bit result and its low-part
//    carry, and the carry-aware selection (fpdiv_qsel_carry) picks q[i+2].
//  * q[i+3]: the lower 7 bits of the chosen 9-bit value (16*rem[i+1], three
//    integer and four fraction bits) are added in five 7-bit adders to the
//    7 MSBs of -4*q*z for each value of q[i+2], with a carry-in of 1; q[i+2]
//    picks one and the 6 MSBs go to the standard selection.
// Remainder side: three rows of five carry-save candidates (fpdiv_rem_cands),
// each row muxed by the digit of its iteration.
// Purely combinational: the caller registers rem[i+3] and the digits.
module fpdiv_digit_cycle
  import fpdiv_pkg::*;
(
  input  rem_t    p,     // rem[i], positive word
  input  rem_t    n,     // rem[i], negative word
  input  rem_t    z,     // scaled divisor
  output rem_t    p_o,   // rem[i+3], positive word
  output rem_t    n_o,   // rem[i+3], negative word
  output qdigit_t q1,    // q[i+1]
  output qdigit_t q2,    // q[i+2]
  output qdigit_t q3     // q[i+3]
);
  function automatic rem_t pick(rem_t [4:0] c, qdigit_t q);
    rem_t r;
    r = '0;
    for (int k = 0; k < 5; k++)
      if (q[k]) r = r | c[k];
    return r;
  endfunction

  // ---- iteration 1 --------------------------------------------------------
  logic [5:0] est1;
  assign est1 = p[56:51] + ~n[56:51] + 6'd1;
  fpdiv_qsel u_sel1 (.est(est1), .q(q1));

  rem_t [4:0] cp1, cn1;
  fpdiv_rem_cands u_row1 (.p(p), .n(n), .z(z), .cp(cp1), .cn(cn1));

  // 9-bit assimilation of each candidate (3-bit low part + 6-bit high part)
  logic [8:0] v9c [5];
  logic       c9c [5];
  always_comb begin
    for (int k = 0; k < 5; k++) begin
      logic [3:0] lo;
      logic [5:0] hi;
      lo = {1'b0, cp1[k][50:48]} + {1'b0, ~cn1[k][50:48]} + 4'd1;
      hi = cp1[k][56:51] + ~cn1[k][56:51] + {5'd0, lo[3]};
      v9c[k] = {hi, lo[2:0]};
      c9c[k] = lo[3];
    end
  end

  logic [8:0] v9;
  logic       c9;
  always_comb begin
    v9 = '0;
    c9 = 1'b0;
    for (int k = 0; k < 5; k++)
      if (q1[k]) begin
        v9 = v9 | v9c[k];
        c9 = c9 | c9c[k];
      end
  end

  rem_t p1, n1;
  assign p1 = pick(cp1, q1);
  assign n1 = pick(cn1, q1);

  // ---- iteration 2 --------------------------------------------------------
  fpdiv_qsel_carry u_sel2 (.est(v9[8:3]), .carry(c9), .q(q2));

  rem_t [4:0] cp2, cn2;
  fpdiv_rem_cands u_row2 (.p(p1), .n(n1), .z(z), .cp(cp2), .cn(cn2));

  // 7 MSBs of -4*q*z for each q (same divisor multiples as the CSA rows)
  rem_t tq [5];
  assign tq[4] = ~(z << 1);
  assign tq[3] = ~z;
  assign tq[2] = '0;
  assign tq[1] = z;
  assign tq[0] = z << 1;

  logic [5:0] e6c [5];
  always_comb begin
    for (int k = 0; k < 5; k++) begin
      logic [6:0] s7;
      s7 = v9[6:0] + tq[k][56:50] + 7'd1;
      e6c[k] = s7[6:1];
    end
  end

  logic [5:0] est3;
  always_comb begin
    est3 = '0;
    for (int k = 0; k < 5; k++)
      if (q2[k]) est3 = est3 | e6c[k];
  end

  rem_t p2, n2;
  assign p2 = pick(cp2, q2);
  assign n2 = pick(cn2, q2);

  // ---- iteration 3 --------------------------------------------------------
  fpdiv_qsel u_sel3 (.est(est3), .q(q3));

  rem_t [4:0] cp3, cn3;
  fpdiv_rem_cands u_row3 (.p(p2), .n(n2), .z(z), .cp(cp3), .cn(cn3));

  assign p_o = pick(cp3, q3);
  assign n_o = pick(cn3, q3);
endmodule
