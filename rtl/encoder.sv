// encoder -- two-line HDB3-style encoder.
//
// ser_data is shifted into a four-stage register (shift_reg). When the four
// stages are all 0 (big_in, a NAND4 of the complement outputs followed by an
// inverter) the counter opens a four-cycle special window (spec_st); during
// it the four zeros that leave the register on q3 are replaced by the pattern
// tx0 = 1,0,0,1 / tx1 = 0,1,1,0. Outside it line_select sends each '1' on
// tx0 and tx1 by turns. The block structure (shift register, counter, line
// selector) and the debug outputs q3, big_in and spec_st follow the original
// ENCODER cell.
// Timing: a bit sampled from ser_data at rising edge n is on q3 after edge
// n+3 and its code is on tx0/tx1 after edge n+4. After clr_n the register
// holds 0000, so the encoder starts by sending one special pattern.
module encoder
  import hdb3_pkg::*;
(
  input  logic clk,
  input  logic ser_data,
  input  logic clr_n,
  input  logic pre_n,
  output logic tx0,
  output logic tx1,
  output logic q3,
  output logic big_in,
  output logic spec_st
);

  logic [RUN_LEN-1:0] sr_q, sr_q_n;
  logic               cnt_a, cnt_b;

  shift_reg #(.DEPTH(RUN_LEN)) u_sr (
    .clk(clk), .d(ser_data), .clr_n(clr_n), .pre_n(pre_n), .q(sr_q), .q_n(sr_q_n)
  );

  // Four zeros in the register: AND of the complement outputs.
  assign big_in = &sr_q_n;
  assign q3     = sr_q[RUN_LEN-1];

  counter u_cnt (
    .clk(clk), .big_in(big_in), .clr_n(clr_n), .pre_n(pre_n),
    .q0(cnt_a), .q1(cnt_b), .spec_en(spec_st)
  );

  line_select u_ls (
    .clk(clk), .a(cnt_a), .b(cnt_b), .big_en(spec_st), .q3(q3),
    .clr_n(clr_n), .pre_n(pre_n), .tx0(tx0), .tx1(tx1)
  );

endmodule
