// tb_line_select -- self-checking test of the line selector.
// Random q3 stream with random special windows (big_en with a/b counting the
// phase). The reference registers the lines one clock late: in a window
// tx0 = xnor(a,b), tx1 = its complement; otherwise each q3 = 1 goes to tx0 and
// tx1 by turns, starting with tx0 after clear, the turn being kept across a
// window. Also checks preset (both lines 1) and counts alternations.
// Alternation and the xnor-generated pattern follow the original; the
// turn flip-flop keeping its state through a pattern is this design's choice.
module tb_line_select;
  logic clk = 0, a = 0, b = 0, big_en = 0, q3 = 0, clr_n = 1, pre_n = 1;
  logic tx0, tx1;
  logic exp0 = 0, exp1 = 0, turn1 = 0;
  int checks = 0, failures = 0, marks0 = 0, marks1 = 0, pat_cycles = 0;

  line_select dut (.clk(clk), .a(a), .b(b), .big_en(big_en), .q3(q3),
                   .clr_n(clr_n), .pre_n(pre_n), .tx0(tx0), .tx1(tx1));

  always #5 clk = ~clk;

  task automatic check(string what);
    checks++;
    if (tx0 !== exp0 || tx1 !== exp1) begin
      failures++;
      if (failures < 10) $display("%t %s: tx=%b%b exp %b%b", $time, what, tx0, tx1, exp0, exp1);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int ph = -1;
    #1 clr_n = 0;
    #1 check("clear");
    clr_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (ph < 0 && $urandom_range(0, 9) == 0) ph = 0;
      big_en = (ph >= 0);
      {b, a} = big_en ? 2'(ph) : 2'($urandom_range(0, 3));
      q3 = big_en ? 1'b0 : 1'($urandom_range(0, 1));
      if (i == 1500) begin
        #1 pre_n = 0; exp0 = 1; exp1 = 1; turn1 = 1; #1 check("preset"); pre_n = 1;
      end
      @(posedge clk);
      if (big_en) begin
        exp0 = ~(a ^ b); exp1 = a ^ b; pat_cycles++;
        ph = (ph == 3) ? -1 : ph + 1;
      end else begin
        exp0 = q3 & ~turn1; exp1 = q3 & turn1;
        if (q3) turn1 = ~turn1;
      end
      #1 check("edge");
      marks0 += int'(tx0 && !big_en);
      marks1 += int'(tx1 && !big_en);
    end
    if (marks0 == 0 || marks1 == 0 || pat_cycles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
