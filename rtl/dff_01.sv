// dff_01 -- rising-edge D flip-flop with asynchronous reset and set.
//
// q takes d on each rising clk edge. r_n = 0 clears q to 0 and s_n = 0 sets
// it to 1 without waiting for the clock; reset wins if both are low (this
// design's choice). q_n is the complement of q. Only the cell's terminals
// (CLK, D, Q, _Q, _R, _S) are known, so it is written as a plain flip-flop.
module dff_01 (
  input  logic clk,
  input  logic d,
  input  logic r_n,
  input  logic s_n,
  output logic q,
  output logic q_n
);

  // One asynchronous load: while either control is low, q is forced to
  // r_n (0 while clearing, else 1 while presetting).
  logic async_n;

  assign async_n = r_n & s_n;

  always_ff @(posedge clk or negedge async_n) begin
    if (!async_n)   q <= r_n;
    else            q <= d;
  end

  assign q_n = ~q;

endmodule
