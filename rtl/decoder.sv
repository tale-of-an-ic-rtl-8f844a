// decoder -- two-line HDB3-style decoder with error checking.
//
// rx0 and rx1 are each shifted into a four-stage register (shift_reg). When
// the registers hold the special pattern, decoder_parts raises big_in, which
// starts the same counter the encoder uses; its window (sp_en) makes the four
// pattern cycles come out as 0000 on main_out. Otherwise main_out is rx0|rx1
// four clocks late. decoder_parts also raises the coding-error flags, given
// here as the active-low pins of the original cell (_Both_2ones, _D0_2ones,
// _D1_2ones, _four_zeros, _ERROR).
// Timing: a line value sampled at rising edge n reaches stage 3 after edge
// n+3; main_out and the flags for it are valid in that cycle (combinational
// from the registers). With the encoder in front, a serial bit sampled at
// edge n appears on main_out after edge n+8: nine rising edges in all.
// The structure (two registers, counter, Decoder_parts) and the pin set
// follow the original Decoder_test cell; a_shift/b_shift are taken from
// stage 3 and sp_state is the pattern-detect signal (choices of this design).
// Lint note: clr_n is both an asynchronous control and the value loaded by the
// flip-flops' shared clear/preset load, so verilator reports it as used both
// ways; this is intended (clear wins over preset with one asynchronous load).
module decoder
  import hdb3_pkg::*;
(
  input  logic clk,
  input  logic rx0,
  input  logic rx1,
  input  logic clr_n,
  input  logic pre_n,
  output logic main_out,
  output logic a_shift,
  output logic b_shift,
  output logic sp_state,
  output logic sp_en,
  output logic both_2ones_n,
  output logic d0_2ones_n,
  output logic d1_2ones_n,
  output logic four_zeros_n,
  output logic error_n
);

  logic [RUN_LEN-1:0] a, a_n_unused, b, b_n_unused;
  logic               pat;
  logic               cnt_q0_unused, cnt_q1_unused;
  dec_err_t           err;
  logic               error;

  shift_reg #(.DEPTH(RUN_LEN)) u_sr_a (
    .clk(clk), .d(rx0), .clr_n(clr_n), .pre_n(pre_n), .q(a), .q_n(a_n_unused)
  );
  shift_reg #(.DEPTH(RUN_LEN)) u_sr_b (
    .clk(clk), .d(rx1), .clr_n(clr_n), .pre_n(pre_n), .q(b), .q_n(b_n_unused)
  );

  counter u_cnt (
    .clk(clk), .big_in(pat), .clr_n(clr_n), .pre_n(pre_n),
    .q0(cnt_q0_unused), .q1(cnt_q1_unused), .spec_en(sp_en)
  );

  decoder_parts u_parts (
    .clk(clk), .clr_n(clr_n), .a(a), .b(b), .sp_en(sp_en),
    .big_in(pat), .main_out(main_out), .err(err), .error(error)
  );

  assign a_shift      = a[RUN_LEN-1];
  assign b_shift      = b[RUN_LEN-1];
  assign sp_state     = pat;
  assign both_2ones_n = ~err.both_2ones;
  assign d0_2ones_n   = ~err.d0_2ones;
  assign d1_2ones_n   = ~err.d1_2ones;
  assign four_zeros_n = ~err.four_zeros;
  assign error_n      = ~error;

endmodule
