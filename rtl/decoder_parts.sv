// decoder_parts -- error testing and signal assembly of the decoder.
//
// Inputs are the four stages of the two receive shift registers (a = Rx0,
// b = Rx1, stage 3 oldest) and the counter's window flag sp_en. Outputs:
//  * big_in    : the registers hold the special pattern (a = 1001, b = 0110);
//                it starts the decoder's counter.
//  * main_out  : the rebuilt serial bit for stage 3: 0 inside a special window,
//                otherwise a[3] | b[3].
//  * err       : the four coding errors, each about the bit on stage 3:
//      both_2ones  a[3] and b[3] both 1;
//      d0_2ones    a 1 on Rx0 in this and the previous cycle,
//      d1_2ones    the same on Rx1 -- both ignored when either cycle belongs to
//                  a special pattern (it puts 1s next to each other legally);
//      four_zeros  all eight stages 0: four cycles with both lines 0, which a
//                  correct stream never has because four zeros are sent as
//                  the pattern.
//  * error     : OR of the four.
// The errors and their rules come from the decoder specification. The
// specification exempts the special pattern on both lines, and so does this
// block; the original circuit exempted line 1 only, which flags a correct
// line-0 '1' that sits next to a pattern's line-0 '1'. The gate
// network of the original cell is not known, so this is the simplest logic
// that does it. Three flip-flops (this design's choice) hold the previous
// stage-3 bits and window flag, so every flag is aligned with main_out.
// Everything except those three flip-flops is combinational.
module decoder_parts
  import hdb3_pkg::*;
(
  input  logic               clk,
  input  logic               clr_n,
  input  logic [RUN_LEN-1:0] a,
  input  logic [RUN_LEN-1:0] b,
  input  logic               sp_en,
  output logic               big_in,
  output logic               main_out,
  output dec_err_t           err,
  output logic               error
);

  logic prev_a, prev_b, prev_win;

  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n) begin
      prev_a   <= 1'b0;
      prev_b   <= 1'b0;
      prev_win <= 1'b0;
    end else begin
      prev_a   <= a[RUN_LEN-1];
      prev_b   <= b[RUN_LEN-1];
      prev_win <= sp_en;
    end
  end

  assign big_in   = (a == SPEC_TX0) && (b == SPEC_TX1);
  assign main_out = ~sp_en & (a[RUN_LEN-1] | b[RUN_LEN-1]);

  always_comb begin
    err.both_2ones = a[RUN_LEN-1] & b[RUN_LEN-1];
    err.d0_2ones   = a[RUN_LEN-1] & prev_a & ~sp_en & ~prev_win;
    err.d1_2ones   = b[RUN_LEN-1] & prev_b & ~sp_en & ~prev_win;
    err.four_zeros = (a == '0) && (b == '0);
  end

  assign error = |err;

endmodule
