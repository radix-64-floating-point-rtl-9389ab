// tb_fpdiv_normalize: checks normalization of subnormal operands.
// For random nonzero significands with leading zeros the output must have its
// integer bit set, keep the value (sig * 2^exp unchanged) and clear 'sub'.
`timescale 1ns/1ps
module tb_fpdiv_normalize;
  import fpdiv_pkg::*;
  operand_t i_op, o_op;
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

  fpdiv_normalize u_dut (.op_i(i_op), .op_o(o_op));

  initial begin
    int sh;
    for (int i = 0; i < 20000; i++) begin
      i_op = '0;
      i_op.sub = 1;
      i_op.sign = $urandom_range(0, 1);
      i_op.exp = -13'sd1022;
      i_op.sig = {1'b0, 52'({$urandom, $urandom})} >> $urandom_range(0, 52);
      if (i_op.sig == 0) i_op.sig = 53'd1;
      #1;
      sh = int'(i_op.exp) - int'(o_op.exp);
      checks++;
      if (o_op.sig[52] !== 1'b1 || sh < 1 || sh > 52 || (o_op.sig >> sh) !== i_op.sig ||
          o_op.sub !== 1'b0 || o_op.sign !== i_op.sign) begin
        failures++;
        if (failures < 10) $display("sig=%h -> %h shift %0d", i_op.sig, o_op.sig, sh);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
