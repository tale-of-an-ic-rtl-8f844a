// tb_decoder_parts -- self-checking test of the decoder's error/assembly logic.
// Drives random register contents a/b (with the special pattern and the
// all-zero case forced now and then) and a random window flag sp_en, and
// compares big_in, main_out, every error flag and error with a reference
// written from the rules; the previous-cycle state is kept in the testbench.
// Each error kind must be seen at least once.
// The four error rules follow the original specification, with the reading
// of the four-zeros rule (both lines) and the exemption cycles that this
// design chose.
module tb_decoder_parts;
  import hdb3_pkg::*;
  logic clk = 0, clr_n = 1, sp_en = 0;
  logic [3:0] a = 0, b = 0;
  logic big_in, main_out, error;
  dec_err_t err;
  logic pa = 0, pb = 0, pw = 0;
  int checks = 0, failures = 0;
  int seen[4] = '{0, 0, 0, 0};

  decoder_parts dut (.clk(clk), .clr_n(clr_n), .a(a), .b(b), .sp_en(sp_en),
                     .big_in(big_in), .main_out(main_out), .err(err), .error(error));

  always #5 clk = ~clk;

  task automatic expect_eq(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%t %s: got %b exp %b (a=%b b=%b sp=%b)", $time, what, got, exp, a, b, sp_en);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e_both, e_d0, e_d1, e_fz;
    #1 clr_n = 0;
    @(negedge clk);
    clr_n = 1;
    for (int i = 0; i < 4000; i++) begin
      case ($urandom_range(0, 7))
        0: begin a = 4'b1001; b = 4'b0110; end
        1: begin a = 4'b0000; b = 4'b0000; end
        default: begin a = 4'($urandom); b = 4'($urandom); end
      endcase
      sp_en = ($urandom_range(0, 3) == 0);
      #1;
      e_both = a[3] & b[3];
      e_d0   = a[3] & pa & !sp_en & !pw;
      e_d1   = b[3] & pb & !sp_en & !pw;
      e_fz   = (a == 0) && (b == 0);
      expect_eq("big_in", big_in, a == 4'b1001 && b == 4'b0110);
      expect_eq("main_out", main_out, !sp_en && (a[3] || b[3]));
      expect_eq("both", err.both_2ones, e_both);
      expect_eq("d0", err.d0_2ones, e_d0);
      expect_eq("d1", err.d1_2ones, e_d1);
      expect_eq("four_zeros", err.four_zeros, e_fz);
      expect_eq("error", error, e_both | e_d0 | e_d1 | e_fz);
      seen[0] += int'(e_both); seen[1] += int'(e_d0); seen[2] += int'(e_d1); seen[3] += int'(e_fz);
      @(posedge clk);
      pa = a[3]; pb = b[3]; pw = sp_en;
      @(negedge clk);
    end
    foreach (seen[k]) if (seen[k] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
