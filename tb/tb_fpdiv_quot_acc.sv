// tb_fpdiv_quot_acc: checks the signed-digit quotient registers.
// After loading an integer digit and shifting in random digit triples, the
// value quot_pos - quot_neg must equal the radix-4 number of the digits
// (each cycle: value*64 + 16*q1 + 4*q2 + q3), cycle by cycle.
`timescale 1ns/1ps
module tb_fpdiv_quot_acc;
  import fpdiv_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, q1_two = 0, shift = 0;
  qdigit_t q1, q2, q3;
  logic [55:0] qp, qn;
  int checks = 0, failures = 0;
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > 100000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  fpdiv_quot_acc u_dut (.clk(clk), .rst_n(rst_n), .load(load), .q1_two(q1_two),
                        .shift(shift), .q1(q1), .q2(q2), .q3(q3),
                        .quot_pos(qp), .quot_neg(qn));

  function automatic qdigit_t mk(int v);
    qdigit_t q;
    q = '0;
    case (v)
      2: q.p2 = 1; 1: q.p1 = 1; 0: q.z = 1; -1: q.n1 = 1; default: q.n2 = 1;
    endcase
    return q;
  endfunction

  initial begin
    logic signed [63:0] model;
    int d1, d2, d3;
    q1 = mk(0); q2 = mk(0); q3 = mk(0);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      q1_two = $urandom_range(0, 1);
      load = 1;
      model = q1_two ? 2 : 1;
      @(negedge clk);
      load = 0;
      for (int c = 0; c < 9; c++) begin
        d1 = $urandom_range(0, 4) - 2; d2 = $urandom_range(0, 4) - 2; d3 = $urandom_range(0, 4) - 2;
        q1 = mk(d1); q2 = mk(d2); q3 = mk(d3);
        shift = 1;
        @(negedge clk);
        shift = 0;
        model = model * 64 + 16 * d1 + 4 * d2 + d3;
        checks++;
        if ($signed(64'(qp) - 64'(qn)) != model) begin
          failures++;
          if (failures < 10) $display("value mismatch after %0d shifts", c + 1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
