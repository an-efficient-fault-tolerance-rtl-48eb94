// ibist_analyzer_tb: self-checking testbench of ibist_analyzer.
//
// Acts as the lower die: for each test run it drives the expected vector
// sequence (LFSR states from x^10+x^7+1, seed 0101010101, each followed by
// its complement) on the ten TSVs for 32
// cycles, with a random set of TSVs forced to stuck-at-0 or stuck-at-1. The
// expected signature is worked out from the vectors actually sent: a TSV is
// marked when a forced value differed from the vector bit at least once. It
// also checks the per-cycle mismatch output, that a new run clears the old
// signature, and that the signature holds outside test mode.
module ibist_analyzer_tb;
  localparam int TSVS = 10;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic test;
  logic [TSVS-1:0] tsv_rx, mismatch, error_sig;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ibist_analyzer dut (.clk(clk), .rst_n(rst_n), .test(test), .tsv_rx(tsv_rx),
                      .mismatch(mismatch), .error_sig(error_sig));

  function automatic logic [9:0] next10(logic [9:0] s);
    return {s[8:0], s[9] ^ s[6]};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_test(input logic [TSVS-1:0] s0, input logic [TSVS-1:0] s1, input int vectors);
    logic [TSVS-1:0] v, exp_v, sent, expect_sig;
    v = 10'b0101010101;
    expect_sig = '0;
    for (int t = 0; t < vectors; t++) begin
      sent = ((t % 2) ? ~v : v);
      exp_v = sent;
      sent = (sent & ~s0) | s1;
      @(negedge clk);
      test = 1'b1;
      tsv_rx = sent;
      #1;
      check(mismatch == (sent ^ exp_v),
            $sformatf("vector %0d mismatch %b expected %b", t, mismatch, sent ^ exp_v));
      expect_sig |= sent ^ exp_v;
      if (t % 2) v = next10(v);
    end
    @(negedge clk);
    test = 1'b0;
    tsv_rx = TSVS'($urandom);
    @(negedge clk);
    check(error_sig == expect_sig,
          $sformatf("signature %b expected %b (s0 %b s1 %b)", error_sig, expect_sig, s0, s1));
    repeat (3) begin
      tsv_rx = TSVS'($urandom);
      @(negedge clk);
    end
    check(error_sig == expect_sig, "signature holds outside test mode");
    check(mismatch == '0, "no mismatch outside test mode");
  endtask

  initial begin
    logic [TSVS-1:0] s0, s1;
    test = 1'b0;
    tsv_rx = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(error_sig == '0, "signature clear after reset");
    run_test('0, '0, 32);
    check(error_sig == '0, "fault-free link gives a zero signature");
    run_test(10'b0000000001, '0, 32);     // one stuck-at-0
    check(error_sig == 10'b0000000001, "stuck-at-0 on TSV 0 located");
    run_test('0, 10'b0000100000, 32);     // one stuck-at-1
    check(error_sig == 10'b0000100000, "stuck-at-1 on TSV 5 located");
    run_test('0, '0, 32);
    check(error_sig == '0, "new run clears the old signature");
    for (int r = 0; r < 40; r++) begin
      s0 = TSVS'($urandom) & TSVS'($urandom);
      s1 = TSVS'($urandom) & TSVS'($urandom) & ~s0;
      run_test(s0, s1, 4 + (r % 29));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
