// tff -- toggle flip-flop with asynchronous clear and preset.
//
// On a rising clk edge q inverts when t = 1 and holds when t = 0. clr_n = 0
// forces q = 0 and pre_n = 0 forces q = 1 at once; clear wins. q_n is the
// complement of q.
// The original cell has no t input: it feeds its own complement back to a
// master/slave latch pair and toggles on every edge of a gated clock. Here
// the clock is never gated; the t input is the clock enable that replaces the
// gate, so every flip-flop of the design runs on the one clock.
module tff (
  input  logic clk,
  input  logic t,
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
    else if (t)     q <= ~q;
  end

  assign q_n = ~q;

endmodule
