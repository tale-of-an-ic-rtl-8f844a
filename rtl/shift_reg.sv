// shift_reg -- four-stage shift register (data register of encoder and decoder).
//
// Four d_flipf cells in a chain: on each rising clk edge d enters stage 0 and
// every stage moves one place on, so q[3] is the input delayed by four clocks.
// q holds the true outputs Q0..Q3 and q_n their complements Q0N..Q3N, as the
// original cell brings out both. clr_n clears every stage to 0 and pre_n sets
// every stage to 1, asynchronously. The structure follows the original cell.
module shift_reg #(
  parameter int unsigned DEPTH = 4  // at least 2
) (
  input  logic             clk,
  input  logic             d,
  input  logic             clr_n,
  input  logic             pre_n,
  output logic [DEPTH-1:0] q,
  output logic [DEPTH-1:0] q_n
);

  logic [DEPTH-1:0] d_chain;

  // Stage 0 takes the serial input, stage i the output of stage i-1.
  assign d_chain = {q[DEPTH-2:0], d};

  for (genvar i = 0; i < DEPTH; i++) begin : g_stage
    d_flipf u_ff (
      .clk  (clk),
      .d    (d_chain[i]),
      .clr_n(clr_n),
      .pre_n(pre_n),
      .q    (q[i]),
      .q_n  (q_n[i])
    );
  end

endmodule
