// tb_encoder -- self-checking test of the encoder.
// Serial data mixes random bits with zero runs of 3 to 13 bits. After every
// rising edge tx0/tx1, q3, big_in and spec_st are compared with the cycle
// model in hdb3_ref_pkg. Line rules are also checked directly: never both
// lines 1, never two 1s in a row on one line outside a pattern cycle, never
// four cycles of 0 on both lines; and the code latency: the bit sampled at
// edge n is on q3 after edge n+3 and coded on the lines after edge n+4.
// The pattern, the alternation and the debug outputs follow the original;
// the first '1' going to tx0 and the back-to-back windows are this design's
// own behaviour, fixed by the reference model.
module tb_encoder;
  import hdb3_ref_pkg::*;
  logic clk = 0, ser_data = 0, clr_n = 1, pre_n = 1;
  logic tx0, tx1, q3, big_in, spec_st;
  enc_model m = new();
  int checks = 0, failures = 0, windows = 0, long_runs = 0, zrun = 0, dead = 0;
  int run_left = 0;
  bit hist[$];
  bit p_tx0 = 0, p_tx1 = 0, p_win = 0, p2_win = 0;

  encoder dut (.clk(clk), .ser_data(ser_data), .clr_n(clr_n), .pre_n(pre_n),
               .tx0(tx0), .tx1(tx1), .q3(q3), .big_in(big_in), .spec_st(spec_st));

  always #5 clk = ~clk;

  task automatic expect_eq(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%t %s: got %b exp %b", $time, what, got, exp);
    end
  endtask

  function automatic bit next_bit();
    if (run_left > 0) begin run_left--; return 0; end
    if ($urandom_range(0, 11) == 0) begin run_left = $urandom_range(2, 12); return 0; end
    return 1'($urandom_range(0, 1));
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 clr_n = 0;
    #1 m.reset();
    @(negedge clk);
    clr_n = 1;
    for (int i = 0; i < 8000; i++) begin
      ser_data = next_bit();
      if (ser_data == 0) zrun++; else zrun = 0;
      if (zrun == 8) long_runs++;
      #1;
      expect_eq("big_in", big_in, m.sr == 0);
      expect_eq("spec_st", spec_st, m.win);
      expect_eq("q3", q3, m.sr[3]);
      @(posedge clk);
      hist.push_front(ser_data);
      m.clock(ser_data);
      #1;
      expect_eq("tx0", tx0, m.tx0);
      expect_eq("tx1", tx1, m.tx1);
      if (hist.size() > 4) expect_eq("q3 latency", q3, hist[3]);
      // line rules
      checks++;
      if (tx0 && tx1) failures++;
      if (spec_st && !p_win) windows++;
      if (!p2_win && !p_win && ((tx0 && p_tx0) || (tx1 && p_tx1))) begin
        failures++;
        $display("%t two 1s in a row on one line", $time);
      end
      dead = (!tx0 && !tx1) ? dead + 1 : 0;
      if (dead >= 4) begin failures++; $display("%t four empty cycles", $time); end
      p2_win = p_win; p_win = m.win;
      p_tx0 = tx0; p_tx1 = tx1;
      if (hist.size() > 8) void'(hist.pop_back());
      @(negedge clk);
    end
    $display("windows=%0d runs_of_8=%0d", windows, long_runs);
    if (windows < 20 || long_runs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
