// counter -- special-state counter shared by the encoder and the decoder.
//
// When big_in rises while the counter is idle, it starts a window of RUN_LEN
// (four) clock cycles. spec_en is high for exactly those cycles, and {q1,q0}
// counts 0,1,2,3 through them, so q0/q1 are the phase of the special pattern
// (xnor(q0,q1) = 1,0,0,1 is the pattern on Tx0). spec_en rises in the same
// cycle as big_in (combinationally), so the first pattern bit is produced in
// the cycle the zero run is detected. A big_in that arrives during a window is
// ignored; at the end of a window a new one starts at once if big_in is high.
//
// Like the original cell it is made of three toggle flip-flops: two phase
// bits and one "idle" bit, whose sense (1 = not counting) matches the third
// TFF of the original. The original gates its clock and presets the TFFs
// to stop the count; here the same behaviour comes from clock enables on one
// clock. Both clr_n and pre_n put the counter in its idle state (phase 0).
module counter (
  input  logic clk,
  input  logic big_in,
  input  logic clr_n,
  input  logic pre_n,
  output logic q0,
  output logic q1,
  output logic spec_en
);

  logic idle, idle_n_unused;
  logic q0_n_unused, q1_n_unused;
  logic rst_n;
  logic t_idle;

  // Either asynchronous control returns the counter to idle.
  assign rst_n = clr_n & pre_n;

  assign spec_en = ~idle | big_in;
  // Leave idle when a run is detected, return to idle after the fourth phase.
  assign t_idle  = idle ? big_in : (q0 & q1);

  tff u_ph0  (.clk(clk), .t(spec_en),      .clr_n(rst_n), .pre_n(1'b1),  .q(q0),   .q_n(q0_n_unused));
  tff u_ph1  (.clk(clk), .t(spec_en & q0), .clr_n(rst_n), .pre_n(1'b1),  .q(q1),   .q_n(q1_n_unused));
  tff u_idle (.clk(clk), .t(t_idle),       .clr_n(1'b1),  .pre_n(rst_n), .q(idle), .q_n(idle_n_unused));

endmodule
