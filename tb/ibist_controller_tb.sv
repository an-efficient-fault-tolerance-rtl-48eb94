// ibist_controller_tb: self-checking testbench of ibist_controller.
//
// Checks the reset state, that test_mode is high for exactly TEST_VECTORS
// cycles after a start pulse (run with 5 and with the default 32), that
// load_repair follows for exactly one cycle, that done then stays high, and
// that a second start re-runs the test.
module ibist_controller_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start;
  logic tm5, ld5, busy5, done5;
  logic tm32, ld32, busy32, done32;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ibist_controller #(.TEST_VECTORS(5)) dut5 (
    .clk(clk), .rst_n(rst_n), .start(start),
    .test_mode(tm5), .load_repair(ld5), .busy(busy5), .done(done5));
  ibist_controller dut32 (
    .clk(clk), .rst_n(rst_n), .start(start),
    .test_mode(tm32), .load_repair(ld32), .busy(busy32), .done(done32));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count cycles of each output over one run.
  task automatic run_once(input int runs);
    int n_tm5, n_ld5, n_tm32, n_ld32, first_ld5, first_ld32;
    n_tm5 = 0; n_ld5 = 0; n_tm32 = 0; n_ld32 = 0; first_ld5 = -1; first_ld32 = -1;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    for (int c = 0; c < 60; c++) begin
      if (tm5)  n_tm5++;
      if (ld5)  begin n_ld5++;  if (first_ld5 < 0) first_ld5 = c; end
      if (tm32) n_tm32++;
      if (ld32) begin n_ld32++; if (first_ld32 < 0) first_ld32 = c; end
      check(busy5 == (tm5 || ld5) && busy32 == (tm32 || ld32), "busy = test_mode | load_repair");
      check(!(tm5 && ld5) && !(tm32 && ld32), "test_mode and load_repair exclusive");
      @(posedge clk); #1;
    end
    check(n_tm5 == 5,   $sformatf("run %0d: test_mode %0d cycles, expected 5", runs, n_tm5));
    check(n_tm32 == 32, $sformatf("run %0d: test_mode %0d cycles, expected 32", runs, n_tm32));
    check(n_ld5 == 1 && first_ld5 == 5,   $sformatf("run %0d: load at %0d x%0d", runs, first_ld5, n_ld5));
    check(n_ld32 == 1 && first_ld32 == 32, $sformatf("run %0d: load at %0d x%0d", runs, first_ld32, n_ld32));
    check(done5 && done32 && !busy5 && !busy32, "done after the test");
  endtask

  initial begin
    start = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    check(!tm5 && !ld5 && !done5 && !busy5 && !tm32 && !done32, "idle during reset");
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    check(!tm5 && !done5 && !tm32 && !done32, "stays idle without start");
    run_once(1);
    run_once(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
