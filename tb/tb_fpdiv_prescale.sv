// tb_fpdiv_prescale: checks prescaling and the integer quotient digit.
// For random significands mx, md in [1,2) (plus the table's edge values):
//  * x_lt_d equals mx < md
//  * the scaled divisor z lies in [1-1/64, 1+1/8)
//  * the scale preserves the quotient: w * md == x' * z, with w the scaled
//    dividend (positive word of rem[1]) and x' = 2*mx if mx < md else mx
//  * the negative word is q1 * z with q1 in {1, 2}
//  * rem[1] = w - q1*z satisfies |rem[1]| <= 2/3 * z
`timescale 1ns/1ps
module tb_fpdiv_prescale;
  import fpdiv_pkg::*;
  logic [52:0] mx, md;
  rem_t z, rp, rn;
  logic q1_two, x_lt_d;
  int checks = 0, failures = 0;
  logic clk = 0;
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > 1000000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  fpdiv_prescale u_dut (.mx(mx), .md(md), .z(z), .rem_p(rp), .rem_n(rn),
                        .q1_two(q1_two), .x_lt_d(x_lt_d));

  initial begin
    logic [127:0] lhs, rhs;
    longint signed one, zi, wi, r1;
    int n2 = 0;
    one = 64'sd1 <<< 56;
    for (int i = 0; i < 100000; i++) begin
      mx = {1'b1, 52'({$urandom, $urandom})};
      md = {1'b1, 52'({$urandom, $urandom})};
      if (i < 16) md = {1'b1, 3'(i), 49'(i < 8 ? 0 : -1)};
      if (i % 7 == 0) mx = md + 53'($urandom_range(0, 3)) - 53'(2);
      if (mx[52] == 0) mx = {1'b1, 52'd0};
      #1;
      zi = longint'(z);
      wi = longint'(rp);
      checks++;
      if (x_lt_d !== (mx < md)) begin failures++; $display("compare wrong"); end
      checks++;
      if (zi < one - (one >>> 6) || zi >= one + (one >>> 3)) begin
        failures++; $display("z out of range md=%h z=%h", md, z);
      end
      lhs = 128'(rp) * 128'(md);
      rhs = (mx < md ? 128'(mx) << 1 : 128'(mx)) * 128'(z);
      checks++;
      if (lhs != rhs) begin failures++; $display("scale mismatch"); end
      checks++;
      if (rn != (q1_two ? z << 1 : z)) begin failures++; $display("neg word wrong"); end
      r1 = wi - longint'(rn);
      checks++;
      if (3 * (r1 < 0 ? -r1 : r1) > 2 * zi) begin
        failures++;
        if (failures < 10) $display("rem[1] out of bound mx=%h md=%h q1_two=%0d", mx, md, q1_two);
      end
      if (q1_two) n2++;
    end
    checks++;
    if (n2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
