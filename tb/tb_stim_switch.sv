// tb_stim_switch -- exhaustive test of the input selector:
// toggle = 1 must pass prbs_in, toggle = 0 must pass test_in.
// The switch sense (0 = manual input, 1 = PRBG) follows the original pin
// description.
module tb_stim_switch;
  logic toggle, prbs_in, test_in, in_sel;
  int checks = 0, failures = 0;

  stim_switch dut (.toggle(toggle), .prbs_in(prbs_in), .test_in(test_in), .in_sel(in_sel));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {toggle, prbs_in, test_in} = 3'(v);
      #1;
      checks++;
      if (in_sel !== (toggle ? prbs_in : test_in)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
