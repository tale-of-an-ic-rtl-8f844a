// tb_hdb3_complete -- end-to-end test of the whole core at its default size.
//
// Every cycle all outputs are compared with the cycle models of hdb3_ref_pkg
// (encoder fed with whatever stim_switch selects, decoder fed with whatever
// stat_switch selects) and prbs_out with a reference XNOR shift register.
// Phases:
//  1. PRBG source, loop-back (in_toggle = 1, a = 1): main_out must repeat the
//     serial input nine clock edges later (sampled at edge n, out after edge
//     n+8) with error = 0.
//  2. Manual source (in_toggle = 0) with long zero runs (up to 16 zeros):
//     same checks, many special patterns back to back.
//  3. Manual decoder input (a = 0): line values with every kind of coding
//     error, plus hand-made special patterns; then the rx pins are wired to
//     the tx pins outside the core and the stream must come through intact.
//  4. Preset, then clear and loop-back again.
// Each mechanism (special window in the encoder, pattern found in the
// decoder, alternation on both lines, back-to-back windows, each of the four
// error kinds, both source and both decoder-input settings, the external
// tx-to-rx wiring, preset, the nine-edge latency) is counted and must occur
// at least once.
// The five phases follow the original chip's test configurations (PRBG
// source, manual source, decoder separated, pins wired, reset/preset) and its
// nine-clock latency; the random stimulus is this testbench's own.
module tb_hdb3_complete;
  import hdb3_ref_pkg::*;
  logic clk = 0, clr_n = 1, pre_n = 1, ser_data = 0, a = 1, rx0 = 0, rx1 = 0, in_toggle = 1;
  logic q3, spec_state, tx0, tx1, sp_st_out, error, main_out, prbs_out;
  logic a_shift, b_shift, big_in, sp_en, both_n, d0_n, d1_n, fz_n;

  enc_model   e = new();
  dec_model   m = new();
  logic [14:0] prbs_r = '0;
  localparam logic [3:0] SPEC_PAT0 = 4'b1001, SPEC_PAT1 = 4'b0110;
  int checks = 0, failures = 0, run_left = 0;
  bit loop_hist[$];
  int since_reset = 0;

  typedef enum int {EV_ENC_WIN, EV_DEC_PAT, EV_MARK0, EV_MARK1, EV_B2B, EV_BOTH, EV_D0, EV_D1,
                    EV_FZ, EV_PRBG_SRC, EV_MAN_SRC, EV_LOOP, EV_MAN_RX, EV_EXT_WIRE, EV_PRESET, EV_LATENCY,
                    EV_N} ev_t;
  int ev[EV_N];
  string ev_name[EV_N] = '{"encoder special window", "decoder pattern found", "mark on tx0",
                           "mark on tx1", "back-to-back windows", "both_2ones error",
                           "d0_2ones error", "d1_2ones error", "four_zeros error",
                           "PRBG source", "manual source", "loop-back", "manual decoder input",
                           "pins tx wired to pins rx", "preset", "nine-edge latency check"};

  hdb3_complete dut (
    .clk(clk), .clr_n(clr_n), .pre_n(pre_n), .ser_data(ser_data), .a(a), .rx0(rx0), .rx1(rx1),
    .in_toggle(in_toggle), .q3(q3), .spec_state(spec_state), .tx0(tx0), .tx1(tx1),
    .sp_st_out(sp_st_out), .error(error), .main_out(main_out), .prbs_out(prbs_out),
    .a_shift(a_shift), .b_shift(b_shift), .big_in(big_in), .sp_en(sp_en),
    .both_2ones_n(both_n), .d0_2ones_n(d0_n), .d1_2ones_n(d1_n), .four_zeros_n(fz_n)
  );

  always #5 clk = ~clk;

  task automatic expect_eq(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 15) $display("%t %s: got %b exp %b", $time, what, got, exp);
    end
  endtask

  function automatic logic prbs_fb();
    return ~(prbs_r[14] ^ prbs_r[13]);
  endfunction

  // Compare everything that is combinational from the current state.
  task automatic compare_all();
    expect_eq("prbs_out", prbs_out, prbs_fb());
    expect_eq("q3", q3, e.sr[3]);
    expect_eq("big_in", big_in, e.sr == 0);
    expect_eq("spec_state", spec_state, e.win);
    expect_eq("tx0", tx0, e.tx0);
    expect_eq("tx1", tx1, e.tx1);
    expect_eq("main_out", main_out, m.main_out);
    expect_eq("sp_st_out", sp_st_out, m.detect);
    expect_eq("sp_en", sp_en, m.win);
    expect_eq("a_shift", a_shift, m.a[3]);
    expect_eq("b_shift", b_shift, m.b[3]);
    expect_eq("both_n", both_n, !m.both);
    expect_eq("d0_n", d0_n, !m.d0);
    expect_eq("d1_n", d1_n, !m.d1);
    expect_eq("four_zeros_n", fz_n, !m.fz);
    expect_eq("error", error, m.error);
  endtask

  // One clock cycle: inputs are already set (after a falling edge).
  bit prev_win = 0, prev_end = 0;
  task automatic cycle();
    logic enc_in, drx0, drx1;
    #1;
    compare_all();
    enc_in = in_toggle ? prbs_fb() : ser_data;
    drx0   = a ? e.tx0 : rx0;
    drx1   = a ? e.tx1 : rx1;
    ev[EV_PRBG_SRC] += int'(in_toggle);
    ev[EV_MAN_SRC]  += int'(!in_toggle);
    ev[EV_LOOP]     += int'(a);
    ev[EV_MAN_RX]   += int'(!a);
    if (e.win && !prev_win) ev[EV_ENC_WIN]++;
    if (e.win && e.ph == 0 && prev_end) ev[EV_B2B]++;
    prev_end = e.win && e.ph == 3;
    prev_win = e.win;
    ev[EV_DEC_PAT] += int'(m.detect);
    ev[EV_BOTH] += int'(m.both);
    ev[EV_D0]   += int'(m.d0);
    ev[EV_D1]   += int'(m.d1);
    if (since_reset > 10) ev[EV_FZ] += int'(m.fz);
    @(posedge clk);
    // models take the same edge
    m.clock(drx0, drx1);
    e.clock(enc_in);
    prbs_r = {prbs_r[13:0], prbs_fb()};
    loop_hist.push_front(enc_in);
    if (loop_hist.size() > 12) void'(loop_hist.pop_back());
    since_reset++;
    #1;
    ev[EV_MARK0] += int'(tx0 && !tx1);
    ev[EV_MARK1] += int'(tx1 && !tx0);
    @(negedge clk);
  endtask

  // Loop-back end-to-end check: bit sampled at edge n is on main_out after
  // edge n+8. Called right after cycle(), i.e. after the falling edge.
  task automatic check_loop_data();
    if (since_reset > 12) begin
      expect_eq("loop data (9-edge latency)", main_out, loop_hist[8]);
      expect_eq("loop error", error, 1'b0);
      ev[EV_LATENCY]++;
    end
  endtask

  task automatic do_clear();
    #1 clr_n = 0;
    e.reset(); m.reset(); prbs_r = '0; loop_hist.delete(); since_reset = 0;
    prev_win = 0; prev_end = 0;
    #1 clr_n = 1;
  endtask

  function automatic bit next_bit();
    if (run_left > 0) begin run_left--; return 0; end
    if ($urandom_range(0, 7) == 0) begin run_left = $urandom_range(2, 15); return 0; end
    return 1'($urandom_range(0, 1));
  endfunction

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    do_clear();
    // 1. PRBG source, loop-back
    in_toggle = 1; a = 1;
    for (int i = 0; i < 6000; i++) begin cycle(); check_loop_data(); end
    // 2. manual source with long zero runs
    in_toggle = 0;
    for (int i = 0; i < 6000; i++) begin
      ser_data = next_bit();
      cycle();
      if (i > 12) check_loop_data();
    end
    // 3. manual decoder input
    a = 0;
    for (int i = 0; i < 4000; i++) begin
      ser_data = next_bit();
      if (i % 50 < 4) begin      // a hand-made special pattern
        rx0 = SPEC_PAT0[3 - i % 50];
        rx1 = SPEC_PAT1[3 - i % 50];
      end else if (i % 50 < 12) begin  // a correct alternating code
        rx0 = (i % 2 == 0); rx1 = (i % 2 == 1);
      end else begin
        {rx0, rx1} = ($urandom_range(0, 2) == 0) ? 2'b00 : 2'($urandom);
      end
      cycle();
    end
    // 3b. decoder still fed from the rx pins, which are now wired to the
    //     tx pins outside the core: the stream must come through as in 1.
    for (int i = 0; i < 2000; i++) begin
      ser_data = next_bit();
      rx0 = tx0; rx1 = tx1;
      cycle();
      if (i > 20) begin check_loop_data(); ev[EV_EXT_WIRE]++; end
    end
    // 4. preset, then clear and loop-back again
    a = 1; in_toggle = 1;
    #1 pre_n = 0;
    e.sr = '1; e.rem = 0; e.next_tx1 = 1; e.tx0 = 1; e.tx1 = 1; e.eval();
    m.a = '1; m.b = '1; m.rem = 0; m.eval();
    prbs_r = '1;
    #1 pre_n = 1;
    ev[EV_PRESET]++;
    for (int i = 0; i < 50; i++) cycle();
    do_clear();
    for (int i = 0; i < 500; i++) begin cycle(); check_loop_data(); end

    for (int k = 0; k < EV_N; k++) begin
      $display("  %-26s %0d", ev_name[k], ev[k]);
      checks++;
      if (ev[k] == 0) begin failures++; $display("  mechanism never exercised: %s", ev_name[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
