// tb_fpdiv_digit_cycle: checks one digit cycle (three radix-4 iterations).
// A scaled divisor z in [1-1/64, 1+1/8) and a remainder |rem| <= 2/3*z are
// drawn at random (half of them with 4*rem close to a selection boundary),
// and the remainder is split into random positive and negative words. The
// cycle must return rem' = 64*rem - (16*q1 + 4*q2 + q3)*z exactly, with
// |rem'| <= 2/3*z (the convergence bound, which a wrong digit breaks), and
// one-hot digits.
`timescale 1ns/1ps
module tb_fpdiv_digit_cycle;
  import fpdiv_pkg::*;
  rem_t p, n, z, po, no;
  qdigit_t q1, q2, q3;
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

  fpdiv_digit_cycle u_dut (.p(p), .n(n), .z(z), .p_o(po), .n_o(no),
                           .q1(q1), .q2(q2), .q3(q3));

  function automatic int dv(qdigit_t q);
    return q.p2 ? 2 : q.p1 ? 1 : q.n1 ? -1 : q.n2 ? -2 : 0;
  endfunction

  initial begin
    longint signed one, zi, lim, r, ro, expv;
    int hits [5];
    one = 64'sd1 <<< 56;
    for (int i = 0; i < 200000; i++) begin
      zi = one - (one >>> 6) + longint'({$urandom, $urandom} % 64'((one >>> 3) + (one >>> 6)));
      lim = (2 * zi) / 3;
      if (i % 2 == 0) begin
        r = longint'({$urandom, $urandom} % 64'(2 * lim + 1)) - lim;
      end else begin
        // 4*rem near m/8 for a random m, within +-1/16
        r = ((longint'($urandom_range(0, 48)) - 24) * (one >>> 3)) / 4 +
            longint'($urandom_range(0, 1 << 20)) * ((one >>> 6) >>> 20) *
            ($urandom_range(0, 1) ? 1 : -1);
        if (r > lim) r = lim;
        if (r < -lim) r = -lim;
      end
      n = {$urandom, $urandom};
      p = rem_t'(r) + n;
      z = rem_t'(zi);
      #1;
      ro = longint'($signed(po - no));
      expv = 64 * r - longint'(16 * dv(q1) + 4 * dv(q2) + dv(q3)) * zi;
      checks++;
      if (ro != expv || 3 * (ro < 0 ? -ro : ro) > 2 * zi ||
          !$onehot(q1) || !$onehot(q2) || !$onehot(q3)) begin
        failures++;
        if (failures < 10)
          $display("r=%0d z=%0d q=%0d,%0d,%0d out=%0d exp=%0d", r, zi, dv(q1), dv(q2), dv(q3), ro, expv);
      end
      hits[dv(q2) + 2]++;
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (hits[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
