// tb_shift_reg -- self-checking test of the four-stage shift register.
// Shifts a random stream in and checks after every rising edge that stage i
// holds the bit entered i edges earlier (q[3] = input four clocks late) and
// that q_n is its complement; then checks asynchronous clear and preset.
// Four stages of Q and QN with shared clear/preset follow the original
// Final_Shift_Reg cell.
module tb_shift_reg;
  logic       clk = 0, d = 0, clr_n = 1, pre_n = 1;
  logic [3:0] q, q_n;
  logic [3:0] hist = '0;
  int checks = 0, failures = 0;

  shift_reg dut (.clk(clk), .d(d), .clr_n(clr_n), .pre_n(pre_n), .q(q), .q_n(q_n));

  always #5 clk = ~clk;

  task automatic check(string what);
    checks++;
    if (q !== hist || q_n !== ~hist) begin
      failures++;
      if (failures < 10) $display("%t %s: q=%b exp %b", $time, what, q, hist);
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
      @(negedge clk);
      d = 1'($urandom_range(0, 1));
      if (i % 97 == 50) begin #1 pre_n = 0; hist = '1; #1 check("preset"); pre_n = 1; end
      if (i % 89 == 30) begin #1 clr_n = 0; hist = '0; #1 check("clear"); clr_n = 1; end
      @(posedge clk);
      hist = {hist[2:0], d};
      #1 check("shift");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
