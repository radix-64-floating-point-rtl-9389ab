// tb_fpdiv_qsel: exhaustive test of the standard radix-4 digit selection.
// All 64 estimates are applied; the expected digit comes from the selection
// intervals written as real-valued bounds on 4*rem, and the output must be
// exactly one-hot.
`timescale 1ns/1ps
module tb_fpdiv_qsel;
  import fpdiv_pkg::*;
  logic [5:0] est;
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

  fpdiv_qsel u_dut (.est(est), .q(q));

  initial begin
    real v;
    qdigit_t e;
    for (int i = 0; i < 64; i++) begin
      est = 6'(i);
      #1;
      v = real'($signed(est)) / 8.0;
      e = '0;
      if (v >= 13.0/8 && v <= 31.0/8)       e.p2 = 1;
      else if (v >= 4.0/8 && v <= 12.0/8)   e.p1 = 1;
      else if (v >= -3.0/8 && v <= 3.0/8)   e.z  = 1;
      else if (v >= -12.0/8 && v <= -4.0/8) e.n1 = 1;
      else                                  e.n2 = 1;
      checks++;
      if (q !== e || !$onehot(q)) begin
        failures++;
        $display("est=%0d got %b exp %b", $signed(est), q, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
