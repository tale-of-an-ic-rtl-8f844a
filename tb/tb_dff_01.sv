// tb_dff_01 -- self-checking test of the DFF_01 flip-flop (reset _R, set _S).
// Random d each cycle (changed on the falling edge), with occasional
// asynchronous clear and preset pulses in mid-cycle. The reference captures d
// at each rising edge; q must also not change on the falling edge.
// Rising-edge capture and active-low _R/_S follow the original cell; reset
// winning over set is this design's choice and is checked too.
module tb_dff_01;
  logic clk = 0, d = 0, clr_n = 1, pre_n = 1, q, q_n;
  logic ref_q = 0;
  int checks = 0, failures = 0;

  dff_01 dut (.clk(clk), .d(d), .r_n(clr_n), .s_n(pre_n), .q(q), .q_n(q_n));

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
      ref_q = d;
      #1 check("rise");
      @(negedge clk);
      #1 check("fall");
      d = 1'($urandom_range(0, 1));
      case ($urandom_range(0, 19))
        0: begin #1 clr_n = 0; ref_q = 0; #1 check("async clear"); clr_n = 1; end
        1: begin #1 pre_n = 0; ref_q = 1; #1 check("async preset"); pre_n = 1; end
        default: ;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
