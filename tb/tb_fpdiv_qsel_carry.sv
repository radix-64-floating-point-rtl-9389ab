// tb_fpdiv_qsel_carry: exhaustive test of the carry-aware digit selection.
// For all 64 estimates and both carry values the expected digit is the
// standard selection applied to the estimate the 6-bit adder would have
// given directly: the 6-bit value plus one unit when the carry is 0
// (wrapping modulo 64, as the hardware does).
`timescale 1ns/1ps
module tb_fpdiv_qsel_carry;
  import fpdiv_pkg::*;
  logic [5:0] est;
  logic       carry;
  qdigit_t    q;
  int checks = 0, failures = 0;
  logic clk = 0;
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > 10000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  fpdiv_qsel_carry u_dut (.est(est), .carry(carry), .q(q));

  initial begin
    int v;
    logic [5:0] direct;
    qdigit_t e;
    for (int i = 0; i < 128; i++) begin
      est = 6'(i);
      carry = i[6];
      #1;
      direct = est + 6'(!carry);
      v = $signed(direct);
      e = '0;
      if (v >= 13)       e.p2 = 1;
      else if (v >= 4)   e.p1 = 1;
      else if (v >= -3)  e.z  = 1;
      else if (v >= -12) e.n1 = 1;
      else               e.n2 = 1;
      checks++;
      if (q !== e || !$onehot(q)) begin
        failures++;
        $display("est=%0d carry=%0d got %b exp %b", $signed(est), carry, q, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
