// tb_fpdiv_rem_cands: checks that each of the five speculative remainders,
// read as P' - N', equals 4*(P - N) - q*z modulo 2^59, for random words and
// random divisors.
`timescale 1ns/1ps
module tb_fpdiv_rem_cands;
  import fpdiv_pkg::*;
  rem_t p, n, z;
  rem_t [4:0] cp, cn;
  int checks = 0, failures = 0;
  logic clk = 0;
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

  fpdiv_rem_cands u_dut (.p(p), .n(n), .z(z), .cp(cp), .cn(cn));

  initial begin
    rem_t expv;
    for (int i = 0; i < 20000; i++) begin
      p = {$urandom, $urandom};
      n = {$urandom, $urandom};
      z = {$urandom, $urandom} & ((59'd1 << 57) - 1);
      #1;
      for (int k = 0; k < 5; k++) begin
        expv = ((p - n) << 2) - rem_t'(k - 2) * z;
        checks++;
        if (cp[k] - cn[k] !== expv) begin
          failures++;
          if (failures < 10) $display("q=%0d mismatch", k - 2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
