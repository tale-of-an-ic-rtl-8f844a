// stim_switch -- chooses the encoder's serial input.
//
// toggle = 1 passes the on-chip pseudo-random stream prbs_in, toggle = 0 the
// manual test input test_in. Purely combinational: a 2-to-1 multiplexer, as
// the original NAND2/NAND2/NAND2 plus inverter cell is.
module stim_switch (
  input  logic toggle,
  input  logic prbs_in,
  input  logic test_in,
  output logic in_sel
);

  assign in_sel = toggle ? prbs_in : test_in;

endmodule
