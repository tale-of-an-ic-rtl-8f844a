// tb_counter -- self-checking test of the special-state counter.
// big_in is driven with random runs. The reference counts the cycles left in
// a window (rem): a window opens when big_in = 1 and rem = 0 and lasts four
// cycles whatever big_in does meanwhile. Checked every cycle: spec_en, the
// phase {q1,q0} = 0,1,2,3 inside a window and 0 outside, and that xnor(q0,q1)
// gives the Tx0 pattern 1,0,0,1. Also checks that clear and preset stop a
// window and that back-to-back windows happen.
// The four-cycle window and the 1,0,0,1 phase sequence follow the original;
// the restart and ignore rules checked here are this design's own.
module tb_counter;
  logic clk = 0, big_in = 0, clr_n = 1, pre_n = 1;
  logic q0, q1, spec_en;
  int   rem = 0;
  int   checks = 0, failures = 0, windows = 0, back_to_back = 0;
  logic exp_en;
  logic [1:0] exp_ph;
  localparam logic [3:0] TX0_PAT = 4'b1001;

  counter dut (.clk(clk), .big_in(big_in), .clr_n(clr_n), .pre_n(pre_n),
               .q0(q0), .q1(q1), .spec_en(spec_en));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 clr_n = 0;
    #1 clr_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      big_in = ($urandom_range(0, 3) == 0) || (i % 200 < 12);
      if (i % 500 == 250) begin #1 clr_n = 0; rem = 0; #1 clr_n = 1; end
      if (i % 500 == 400) begin #1 pre_n = 0; rem = 0; #1 pre_n = 1; end
      #1;
      exp_en = (rem != 0) || big_in;
      exp_ph = (rem == 0) ? 2'd0 : 2'(4 - rem);
      checks++;
      if (spec_en !== exp_en || {q1, q0} !== exp_ph) begin
        failures++;
        if (failures < 10) $display("%t: spec_en=%b ph=%0d exp %b %0d", $time, spec_en, {q1, q0}, exp_en, exp_ph);
      end
      if (exp_en) begin
        checks++;
        if (~(q0 ^ q1) !== TX0_PAT[3 - exp_ph]) failures++;
      end
      @(posedge clk);
      if (rem == 0 && big_in) begin
        rem = 3; windows++;
        if (i > 0 && exp_ph == 0 && back_to_back >= 0 && last_was_end) back_to_back++;
      end else if (rem != 0) rem = rem - 1;
      last_was_end = (exp_en && exp_ph == 3);
    end
    if (windows < 10 || back_to_back == 0) failures++;
    $display("windows=%0d back_to_back=%0d", windows, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  bit last_was_end = 0;
endmodule
