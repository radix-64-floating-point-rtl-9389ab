// fpdiv_ctrl: sequencer of the divider.
//
// Cycle sequences (each name is one clock cycle):
//   normal operands:        E1/PS - DGT x n - RND1
//   one subnormal operand:  E1 - NM1 - PS - DGT x n - RND1
//   two subnormal operands: E1 - NM1 - NM2 - PS - DGT x n - RND1
//   tiny result:            ... - RND1 - RND2
//   early termination:      E1
// n is the number of digit cycles of the format: 2 (HP), 4 (SP), 9 (DP).
// E1/PS happens in S_IDLE, in the cycle in which 'start' is high: unpacking,
// early-termination checks and, for normal operands, prescaling all read
// the input ports directly. With a subnormal operand E1 only registers the
// unpacked operands; each NM cycle normalizes one of them (dividend first)
// and a separate PS cycle prescales the registered operands.
// Outputs are strobes, decoded from the state, telling the datapath what to
// load at the end of the current cycle. 'fin' marks the cycle in which the
// result is written; the datapath raises 'done' in the next cycle.
// Synchronous state register with asynchronous active-low reset. rst_n also
// appears in the 'disable iff' of the two assertions at the end, which lint
// reports as a synchronous use of the reset; it is not logic.
module fpdiv_ctrl
  import fpdiv_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fmt_e fmt,        // format of the division (valid at prescale)
  input  logic early,      // E1: result known without iterations
  input  logic any_sub,    // E1: an operand is subnormal
  input  logic x_sub,      // registered dividend still subnormal
  input  logic d_sub,      // registered divisor still subnormal
  input  logic tiny,       // RND1: result below the normal range
  output logic ready,      // idle, start is accepted
  output logic e1_early,   // write the early-termination result
  output logic e1_save,    // register the unpacked operands
  output logic nm_x,       // normalize the registered dividend
  output logic nm_d,       // normalize the registered divisor
  output logic ps_load,    // load scaled divisor, rem[1] and integer digit
  output logic ps_regs,    // prescale from registered operands (else ports)
  output logic dgt,        // digit cycle: load rem[i+3] and three digits
  output logic rnd1,       // RND1 cycle
  output logic rnd2,       // RND2 cycle
  output logic rnd_save,   // keep the RND1 fraction for RND2
  output logic fin         // result is written at the end of this cycle
);
  typedef enum logic [2:0] {
    S_IDLE = 3'd0,
    S_NM   = 3'd1,
    S_PS   = 3'd2,
    S_DGT  = 3'd3,
    S_RND1 = 3'd4,
    S_RND2 = 3'd5
  } state_e;

  state_e     state, state_n;
  logic [3:0] cnt;

  assign ready    = (state == S_IDLE);
  assign e1_early = ready & start & early;
  assign e1_save  = ready & start & ~early & any_sub;
  assign nm_x     = (state == S_NM) & x_sub;
  assign nm_d     = (state == S_NM) & ~x_sub & d_sub;
  assign ps_regs  = (state == S_PS);
  assign ps_load  = (ready & start & ~early & ~any_sub) | ps_regs;
  assign dgt      = (state == S_DGT);
  assign rnd1     = (state == S_RND1);
  assign rnd2     = (state == S_RND2);
  assign rnd_save = rnd1 & tiny;
  assign fin      = e1_early | (rnd1 & ~tiny) | rnd2;

  always_comb begin
    state_n = state;
    case (state)
      S_IDLE: if (e1_save) state_n = S_NM;
              else if (ps_load) state_n = S_DGT;
      S_NM:   if (!(x_sub && d_sub)) state_n = S_PS;
      S_PS:   state_n = S_DGT;
      S_DGT:  if (cnt == '0) state_n = S_RND1;
      S_RND1: state_n = tiny ? S_RND2 : S_IDLE;
      S_RND2: state_n = S_IDLE;
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else begin
      state <= state_n;
      if (ps_load)  cnt <= 4'(digit_cycles(fmt) - 1);
      else if (dgt) cnt <= cnt - 4'd1;
    end
  end

  // The digit counter never wraps inside a division
  a_cnt_range: assert property (@(posedge clk) disable iff (!rst_n) dgt |-> cnt <= 4'd8);
  // A division is only started when the divider is idle
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> ready);
endmodule
