// line_select -- places the data onto the two transmit lines.
//
// Outside the special state (big_en = 0), every '1' that leaves the shift
// register on q3 is sent on one line only, alternating between tx0 and tx1, so
// neither line carries two '1's in a row; a '0' is sent as 0 on both lines.
// While big_en = 1 the lines carry the special pattern instead: tx0 =
// xnor(a, b) and tx1 its complement, where a/b are the counter phase bits, which
// gives tx0 = 1,0,0,1 and tx1 = 0,1,1,0 over the four phases.
// A toggle flip-flop (sel) remembers which line takes the next '1'; it flips
// after each '1' sent in normal mode and keeps its value through a special
// pattern. Both outputs are registered in dff_01 cells, so tx0/tx1 change one
// clock after q3/big_en. The gates, the TFF and the two output DFF_01 cells
// follow the original schematic. Choices of this design: the first '1' after
// clr_n goes to tx0, and the TFF uses a clock enable instead of a gated clock.
// pre_n sets both output flip-flops and the select flip-flop to 1.
module line_select (
  input  logic clk,
  input  logic a,
  input  logic b,
  input  logic big_en,
  input  logic q3,
  input  logic clr_n,
  input  logic pre_n,
  output logic tx0,
  output logic tx1
);

  logic pat;          // xnor of the phase bits: special-pattern bit for tx0
  logic sel, sel_n;   // sel = 0: next '1' goes to tx0
  logic d0, d1;
  logic tx0_n_unused, tx1_n_unused;

  assign pat = ~(a ^ b);

  assign d0 = big_en ? pat  : (q3 & sel_n);
  assign d1 = big_en ? ~pat : (q3 & sel);

  tff u_sel (.clk(clk), .t(q3 & ~big_en), .clr_n(clr_n), .pre_n(pre_n), .q(sel), .q_n(sel_n));

  dff_01 u_tx0 (.clk(clk), .d(d0), .r_n(clr_n), .s_n(pre_n), .q(tx0), .q_n(tx0_n_unused));
  dff_01 u_tx1 (.clk(clk), .d(d1), .r_n(clr_n), .s_n(pre_n), .q(tx1), .q_n(tx1_n_unused));

endmodule
