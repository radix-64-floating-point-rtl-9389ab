// tb_fpdiv_unpack: checks operand unpacking for all three formats.
// The magnitude rebuilt from the unpacked fields, sig * 2^(exp-52), must equal
// the value decoded independently from the bit fields (as a real number), and
// the class flags must match the encoding.
`timescale 1ns/1ps
module tb_fpdiv_unpack;
  import fpdiv_pkg::*;
  fmt_e fmt;
  logic [63:0] val;
  operand_t op;
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

  fpdiv_unpack u_dut (.fmt(fmt), .val(val), .op(op));

  initial begin
    int fb, eb, bs, e;
    logic [63:0] f;
    real vexp, vgot;
    bit zero, inf, nan, sub;
    for (int i = 0; i < 30000; i++) begin
      fmt = fmt_e'(i % 3);
      fb = (fmt == FMT_HP) ? 10 : (fmt == FMT_SP) ? 23 : 52;
      eb = (fmt == FMT_HP) ? 5 : (fmt == FMT_SP) ? 8 : 11;
      bs = (1 << (eb - 1)) - 1;
      val = {$urandom, $urandom} & ((64'd1 << (fb + eb + 1)) - 1);
      if (i % 5 == 1) val = val & ~(((64'd1 << eb) - 1) << fb);           // subnormal/zero
      if (i % 5 == 2) val = val | (((64'd1 << eb) - 1) << fb);            // inf/NaN
      if (i % 11 == 3) val = val & ~((64'd1 << fb) - 1);                  // zero fraction
      e = int'((val >> fb) & ((64'd1 << eb) - 1));
      f = val & ((64'd1 << fb) - 1);
      zero = (e == 0) && (f == 0);
      sub  = (e == 0) && (f != 0);
      inf  = (e == (1 << eb) - 1) && (f == 0);
      nan  = (e == (1 << eb) - 1) && (f != 0);
      #1;
      checks++;
      if (op.sign !== val[fb + eb] || op.zero !== zero || op.sub !== sub ||
          op.inf !== inf || op.nan !== nan || op.snan !== (nan && !f[fb - 1])) begin
        failures++; $display("class mismatch %h", val);
      end
      if (!inf && !nan) begin
        vexp = real'(f + ((e == 0) ? 0 : (64'd1 << fb))) * $pow(2.0, real'((e == 0 ? 1 : e) - bs - fb));
        vgot = real'(op.sig) * $pow(2.0, real'(int'(op.exp) - 52));
        checks++;
        if (vexp != vgot) begin failures++; $display("value mismatch %h", val); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
