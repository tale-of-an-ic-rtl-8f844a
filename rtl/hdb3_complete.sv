// hdb3_complete -- the whole encoder/decoder core with its test sources.
//
// Data path: stim_switch picks the serial input (in_toggle = 1: on-chip PRBG,
// 0: the ser_data pin) -> encoder -> tx0/tx1 -> stat_switch (a = 1: loop the
// encoder back into the decoder, 0: feed the decoder from the rx0/rx1 pins)
// -> decoder -> main_out and the error flags. All flip-flops run on the
// rising edge of clk; clr_n (clear) and pre_n (preset) are asynchronous and
// active low and reach every block.
// In loop-back, a bit sampled at rising edge n comes out on main_out after
// edge n+8 (nine clock edges). error is active high, the four separate flags
// are active low. The pin set is that of the original HDB3_Complete cell:
// spec_state is the encoder's special-window flag, big_in its four-zeros
// detect, q3 its shift-register output, sp_st_out/sp_en the decoder's
// pattern-detect and window flags, a_shift/b_shift the decoder's stage-3 bits.
// Lint note: clr_n is both an asynchronous control and, inside every flip-flop,
// the value loaded by the shared clear/preset load (q <= clr_n), so verilator
// reports it as used synchronously and asynchronously. That is intended: it is
// what gives clear priority over preset with a single asynchronous load.
module hdb3_complete (
  input  logic clk,
  input  logic clr_n,
  input  logic pre_n,
  input  logic ser_data,
  input  logic a,
  input  logic rx0,
  input  logic rx1,
  input  logic in_toggle,
  output logic q3,
  output logic spec_state,
  output logic tx0,
  output logic tx1,
  output logic sp_st_out,
  output logic error,
  output logic main_out,
  output logic prbs_out,
  output logic a_shift,
  output logic b_shift,
  output logic big_in,
  output logic sp_en,
  output logic both_2ones_n,
  output logic d0_2ones_n,
  output logic d1_2ones_n,
  output logic four_zeros_n
);

  logic enc_in;
  logic dec_rx0, dec_rx1;
  logic error_n;

  prbg u_prbg (.clk(clk), .clr_n(clr_n), .pre_n(pre_n), .tx_prbs(prbs_out));

  stim_switch u_stim (.toggle(in_toggle), .prbs_in(prbs_out), .test_in(ser_data), .in_sel(enc_in));

  encoder u_enc (
    .clk(clk), .ser_data(enc_in), .clr_n(clr_n), .pre_n(pre_n),
    .tx0(tx0), .tx1(tx1), .q3(q3), .big_in(big_in), .spec_st(spec_state)
  );

  stat_switch u_stat (
    .a(a), .tx0(tx0), .tx1(tx1), .rx_data0(rx0), .rx_data1(rx1), .rx0(dec_rx0), .rx1(dec_rx1)
  );

  decoder u_dec (
    .clk(clk), .rx0(dec_rx0), .rx1(dec_rx1), .clr_n(clr_n), .pre_n(pre_n),
    .main_out(main_out), .a_shift(a_shift), .b_shift(b_shift),
    .sp_state(sp_st_out), .sp_en(sp_en),
    .both_2ones_n(both_2ones_n), .d0_2ones_n(d0_2ones_n), .d1_2ones_n(d1_2ones_n),
    .four_zeros_n(four_zeros_n), .error_n(error_n)
  );

  assign error = ~error_n;

endmodule
