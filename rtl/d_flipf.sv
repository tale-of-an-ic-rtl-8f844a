// d_flipf -- rising-edge D flip-flop with asynchronous clear and preset.
//
// q takes the value d has just before each rising clk edge and holds it for
// the whole cycle; q_n is its complement. clr_n = 0 forces q = 0 and
// pre_n = 0 forces q = 1 at once, without the clock; clear wins when both
// are low (this design's choice).
// The original cell is an inverter and two level-sensitive latches in
// master/slave; that structure gives exactly this edge behaviour and is
// written here as one edge-triggered process, so that it cannot race with
// the other flip-flops of the design in a zero-delay simulation.
module d_flipf (
  input  logic clk,
  input  logic d,
  input  logic clr_n,
  input  logic pre_n,
  output logic q,
  output logic q_n
);

  // One asynchronous load: while either control is low, q is forced to
  // clr_n (0 while clearing, else 1 while presetting).
  logic async_n;

  assign async_n = clr_n & pre_n;

  always_ff @(posedge clk or negedge async_n) begin
    if (!async_n)   q <= clr_n;
    else            q <= d;
  end

  assign q_n = ~q;

endmodule
