// tb_decoder -- self-checking test of the decoder.
// Part 1: a random serial stream with zero runs is coded with the encoder
// model of hdb3_ref_pkg and fed to rx0/rx1. main_out must equal the serial
// bit coded at model edge n, four edges after the line value is sampled
// (stage 3), no error may be raised after the first cycles, and special
// patterns must be recognised. Part 2: random line values (with errors); all
// outputs are compared with the decoder model every cycle and each error pin
// must go low at least once.
// The error kinds, the pattern and the active-low flag pins follow the
// original; the stimulus and the alignment of flags with main_out are this
// design's own.
module tb_decoder;
  import hdb3_ref_pkg::*;
  logic clk = 0, rx0 = 0, rx1 = 0, clr_n = 1, pre_n = 1;
  logic main_out, a_shift, b_shift, sp_state, sp_en;
  logic both_n, d0_n, d1_n, fz_n, error_n;
  enc_model e = new();
  dec_model m = new();
  int checks = 0, failures = 0, patterns = 0, run_left = 0;
  int seen[4] = '{0, 0, 0, 0};
  bit data_hist[$];

  decoder dut (.clk(clk), .rx0(rx0), .rx1(rx1), .clr_n(clr_n), .pre_n(pre_n),
               .main_out(main_out), .a_shift(a_shift), .b_shift(b_shift),
               .sp_state(sp_state), .sp_en(sp_en), .both_2ones_n(both_n),
               .d0_2ones_n(d0_n), .d1_2ones_n(d1_n), .four_zeros_n(fz_n), .error_n(error_n));

  always #5 clk = ~clk;

  task automatic expect_eq(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%t %s: got %b exp %b", $time, what, got, exp);
    end
  endtask

  task automatic compare_model();
    expect_eq("main_out", main_out, m.main_out);
    expect_eq("sp_state", sp_state, m.detect);
    expect_eq("sp_en", sp_en, m.win);
    expect_eq("a_shift", a_shift, m.a[3]);
    expect_eq("b_shift", b_shift, m.b[3]);
    expect_eq("both_n", both_n, !m.both);
    expect_eq("d0_n", d0_n, !m.d0);
    expect_eq("d1_n", d1_n, !m.d1);
    expect_eq("four_zeros_n", fz_n, !m.fz);
    expect_eq("error_n", error_n, !m.error);
  endtask

  function automatic bit next_bit();
    if (run_left > 0) begin run_left--; return 0; end
    if ($urandom_range(0, 9) == 0) begin run_left = $urandom_range(2, 12); return 0; end
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
    #1 e.reset();
    m.reset();
    @(negedge clk);
    clr_n = 1;
    // Part 1: valid code
    for (int i = 0; i < 5000; i++) begin
      bit d;
      d = next_bit();
      e.clock(d);              // line value for this cycle
      data_hist.push_front(d);
      rx0 = e.tx0; rx1 = e.tx1;
      @(posedge clk);
      m.clock(rx0, rx1);
      #1;
      compare_model();
      if (sp_state) patterns++;
      // the bit given to the encoder model at step k is on the lines at step
      // k+4 and reaches stage 3 three edges later: main_out at step k+7
      if (i >= 7) expect_eq("data", main_out, data_hist[7]);
      if (i >= 6) expect_eq("no error", error_n, 1'b1);
      if (data_hist.size() > 10) void'(data_hist.pop_back());
      @(negedge clk);
    end
    // Part 2: arbitrary line values
    for (int i = 0; i < 3000; i++) begin
      {rx0, rx1} = ($urandom_range(0, 3) == 0) ? 2'b00 : 2'($urandom);
      if (i % 40 < 4) {rx0, rx1} = {hdb3_pkg::SPEC_TX0[3 - i % 4], hdb3_pkg::SPEC_TX1[3 - i % 4]};
      @(posedge clk);
      m.clock(rx0, rx1);
      #1;
      compare_model();
      seen[0] += int'(!both_n); seen[1] += int'(!d0_n); seen[2] += int'(!d1_n); seen[3] += int'(!fz_n);
      if (i == 2000) begin
        #1 pre_n = 0;
        m.a = '1; m.b = '1; m.rem = 0;  // preset: all line stages 1, counter idle
        m.eval();
        #1 pre_n = 1;
        compare_model();
      end
      @(negedge clk);
    end
    $display("patterns=%0d errors seen both=%0d d0=%0d d1=%0d fz=%0d", patterns, seen[0], seen[1], seen[2], seen[3]);
    if (patterns < 20) failures++;
    foreach (seen[k]) if (seen[k] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
