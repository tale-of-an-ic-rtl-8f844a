// tb_tff -- self-checking test of the toggle flip-flop.
// Random toggle enable each cycle; the reference inverts at each rising edge
// where t = 1. Occasional asynchronous clear and preset pulses.
// The toggle and the active-low clear/preset follow the original cell; the
// toggle enable t is this design's addition (it replaces a gated clock).
module tb_tff;
  logic clk = 0, t = 0, clr_n = 1, pre_n = 1, q, q_n;
  logic ref_q = 0;
  int checks = 0, failures = 0, toggles = 0;

  tff dut (.clk(clk), .t(t), .clr_n(clr_n), .pre_n(pre_n), .q(q), .q_n(q_n));

  always #5 clk = ~clk;

  task automatic check(string what);
    checks++;
    if (q !== ref_q || q_n !== ~ref_q) begin
      failures++;
      if (failures < 10) $display("%t %s: q=%b exp %b", $time, what, q, ref_q);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 clr_n = 0;
    #1 check("clear");
    clr_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(posedge clk);
      if (t) begin ref_q = ~ref_q; toggles++; end
      #1 check("rise");
      @(negedge clk);
      t = 1'($urandom_range(0, 1));
      case ($urandom_range(0, 19))
        0: begin #1 clr_n = 0; ref_q = 0; #1 check("async clear"); clr_n = 1; end
        1: begin #1 pre_n = 0; ref_q = 1; #1 check("async preset"); pre_n = 1; end
        default: ;
      endcase
    end
    if (toggles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
