// tb_stat_switch -- exhaustive test of the decoder-input selector:
// a = 1 must connect tx0/tx1 to rx0/rx1, a = 0 the manual rx_data0/rx_data1.
// The switch sense (0 = separate, 1 = connected) follows the original pin
// description.
module tb_stat_switch;
  logic a, tx0, tx1, rx_data0, rx_data1, rx0, rx1;
  int checks = 0, failures = 0;

  stat_switch dut (.a(a), .tx0(tx0), .tx1(tx1), .rx_data0(rx_data0), .rx_data1(rx_data1),
                   .rx0(rx0), .rx1(rx1));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {a, tx0, tx1, rx_data0, rx_data1} = 5'(v);
      #1;
      checks += 2;
      if (rx0 !== (a ? tx0 : rx_data0)) failures++;
      if (rx1 !== (a ? tx1 : rx_data1)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
