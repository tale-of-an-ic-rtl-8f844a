// stat_switch -- chooses what the decoder receives.
//
// a = 1 connects the encoder outputs tx0/tx1 to the decoder inputs rx0/rx1
// (loop-back); a = 0 connects the manual pins rx_data0/rx_data1 instead, so
// the decoder can be fed with chosen, possibly faulty, line codes. Purely
// combinational: two 2-to-1 multiplexers, as the original NAND cell is.
module stat_switch (
  input  logic a,
  input  logic tx0,
  input  logic tx1,
  input  logic rx_data0,
  input  logic rx_data1,
  output logic rx0,
  output logic rx1
);

  assign rx0 = a ? tx0 : rx_data0;
  assign rx1 = a ? tx1 : rx_data1;

endmodule
