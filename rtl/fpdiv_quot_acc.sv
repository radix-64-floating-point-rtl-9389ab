// fpdiv_quot_acc: signed-digit quotient registers.
//
// The quotient is kept as two words: quot_pos holds the positive digits and
// quot_neg the magnitudes of the negative digits, two bits per radix-4 digit
// (a zero digit is 0 in both). The quotient value is quot_pos - quot_neg,
// formed only once, when rounding. 'load' starts a division with the integer
// digit (+1 or +2); each 'shift' appends the three digits of a digit cycle
// (first digit most significant), shifting both words left by six bits.
// Registers update on the rising clock edge; rst_n is an asynchronous reset.
module fpdiv_quot_acc
  import fpdiv_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic              q1_two,   // integer digit: 1 = +2, 0 = +1
  input  logic              shift,
  input  qdigit_t           q1,
  input  qdigit_t           q2,
  input  qdigit_t           q3,
  output logic [QUOT_W-1:0] quot_pos,
  output logic [QUOT_W-1:0] quot_neg
);
  // Digit fields of the two words
  logic [5:0] pos3, neg3;
  assign pos3 = {q1.p2, q1.p1, q2.p2, q2.p1, q3.p2, q3.p1};
  assign neg3 = {q1.n2, q1.n1, q2.n2, q2.n1, q3.n2, q3.n1};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      quot_pos <= '0;
      quot_neg <= '0;
    end else if (load) begin
      quot_pos <= q1_two ? QUOT_W'(2) : QUOT_W'(1);
      quot_neg <= '0;
    end else if (shift) begin
      quot_pos <= {quot_pos[QUOT_W-7:0], pos3};
      quot_neg <= {quot_neg[QUOT_W-7:0], neg3};
    end
  end
endmodule
