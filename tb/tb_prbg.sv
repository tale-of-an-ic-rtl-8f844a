// tb_prbg -- self-checking test of the pseudo-random bit generator.
// From the cleared (all-zero) state the output is compared, bit by bit, with
// a reference XNOR shift register (x^15 + x^14 + 1) for two full periods;
// the reference period must be 32767 and the DUT stream must repeat with it.
// Also checks that the stream is balanced (16383 ones per period: all states but all-ones) and that
// preset loads the all-ones state, which then gives a constant 1.
// The 15-stage length follows the original; the taps are this design's
// choice, and the reference uses the same ones.
module tb_prbg;
  logic clk = 0, clr_n = 1, pre_n = 1, tx_prbs;
  logic [14:0] r = '0;
  int checks = 0, failures = 0, ones = 0, period = 0;
  localparam int PERIOD = 32767;

  prbg dut (.clk(clk), .clr_n(clr_n), .pre_n(pre_n), .tx_prbs(tx_prbs));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (80000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic fb;
    #1 clr_n = 0;
    @(negedge clk);
    clr_n = 1;
    for (int i = 0; i < 2 * PERIOD; i++) begin
      fb = ~(r[14] ^ r[13]);
      checks++;
      if (tx_prbs !== fb) begin
        failures++;
        if (failures < 10) $display("%t bit %0d: got %b exp %b", $time, i, tx_prbs, fb);
      end
      if (i < PERIOD) ones += int'(fb);
      @(posedge clk);
      r = {r[13:0], fb};
      if (period == 0 && r == '0) period = i + 1;
      @(negedge clk);
    end
    checks++;
    if (period != PERIOD) begin failures++; $display("period %0d", period); end
    checks++;
    if (ones != 16383) begin failures++; $display("ones %0d", ones); end
    pre_n = 0;
    #1 pre_n = 1;
    repeat (20) begin
      @(negedge clk);
      checks++;
      if (tx_prbs !== 1'b1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
