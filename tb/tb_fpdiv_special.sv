// tb_fpdiv_special: checks early termination against the reference model.
// Operands are drawn from zeros, infinities, quiet and signalling NaNs,
// powers of two, subnormals and normals in all formats. 'early' must be set
// exactly when the reference says the division ends in the first cycle, and
// then the result and flags must match the reference.
`timescale 1ns/1ps
module tb_fpdiv_special;
  import fpdiv_pkg::*;
  import fpdiv_ref_pkg::*;
  fmt_e fmt;
  logic [63:0] a, b, result;
  operand_t x, d;
  logic early, pow2;
  fflags_t flags;
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

  fpdiv_unpack u_ux (.fmt(fmt), .val(a), .op(x));
  fpdiv_unpack u_ud (.fmt(fmt), .val(b), .op(d));
  fpdiv_special u_dut (.fmt(fmt), .a(a), .b(b), .x(x), .d(d), .early(early),
                       .pow2(pow2), .result(result), .flags(flags));

  function automatic logic [63:0] pick(fmt_e f);
    int fb, eb;
    logic [63:0] fr, ex;
    fb = frac_bits(f); eb = exp_bits(f);
    fr = {$urandom, $urandom} & ((64'd1 << fb) - 1);
    case ($urandom_range(0, 6))
      0: begin ex = 0; fr = 0; end
      1: begin ex = (64'd1 << eb) - 1; fr = 0; end
      2: begin ex = (64'd1 << eb) - 1; fr = fr | (64'd1 << (fb - 1)); end
      3: begin ex = (64'd1 << eb) - 1; fr = (fr & ~(64'd1 << (fb - 1))) | 1; end
      4: begin ex = 64'($urandom_range(1, (1 << eb) - 2)); fr = 0; end
      5: ex = 0;
      default: ex = 64'($urandom_range(1, (1 << eb) - 2));
    endcase
    return (64'($urandom_range(0, 1)) << (fb + eb)) | (ex << fb) | fr;
  endfunction

  initial begin
    ref_t r;
    int ne = 0, np = 0;
    for (int i = 0; i < 30000; i++) begin
      fmt = fmt_e'($urandom_range(0, 2));
      a = pick(fmt);
      b = pick(fmt);
      #1;
      r = ref_div(fmt, RM_RNE, a, b);
      checks++;
      if (early !== r.early) begin
        failures++;
        if (failures < 10) $display("early mismatch fmt=%0d a=%h b=%h", fmt, a, b);
      end else if (early) begin
        ne++;
        if (pow2) np++;
        checks++;
        if (result !== r.result || flags !== r.flags) begin
          failures++;
          if (failures < 10) $display("result mismatch fmt=%0d a=%h b=%h got %h exp %h", fmt, a, b, result, r.result);
        end
      end
    end
    checks++;
    if (ne == 0 || np == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
