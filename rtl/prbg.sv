// prbg -- on-chip pseudo-random bit-stream generator (test source).
//
// A WIDTH-stage shift register of dff_01 cells with XNOR feedback: each rising
// edge shifts the register one place and loads stage 0 with
// fb = xnor(stage WIDTH-1, stage TAP-1), which is also the output tx_prbs.
// With the defaults this is the polynomial x^15 + x^14 + 1, a maximal-length
// sequence of 2^15-1 = 32767 bits. XNOR feedback makes the all-zero state,
// which clr_n loads, a valid start; the all-ones state, which pre_n loads, is
// the one state the sequence never leaves (it then sends a constant 1).
// Fifteen DFF_01 cells and one XNOR2 are what the original cell uses; the
// tap positions are this design's choice of the standard PRBS15 polynomial.
module prbg #(
  parameter int unsigned WIDTH = 15,
  parameter int unsigned TAP   = 14   // 1 <= TAP < WIDTH
) (
  input  logic clk,
  input  logic clr_n,
  input  logic pre_n,
  output logic tx_prbs
);

  logic [WIDTH-1:0] r, r_n_unused, d_chain;

  assign tx_prbs = ~(r[WIDTH-1] ^ r[TAP-1]);
  assign d_chain = {r[WIDTH-2:0], tx_prbs};

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    dff_01 u_ff (
      .clk(clk), .d(d_chain[i]), .r_n(clr_n), .s_n(pre_n), .q(r[i]), .q_n(r_n_unused[i])
    );
  end

endmodule
