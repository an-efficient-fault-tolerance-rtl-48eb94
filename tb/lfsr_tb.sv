// lfsr_tb: self-checking testbench of lfsr.
//
// Runs a 10-bit (default) and a 5-bit instance. For each it checks every
// vector of a full cycle against a sequence worked out here from the
// textbook polynomials x^10+x^7+1 and x^5+x^3+1 (seeds 0101010101 and
// 10110): each LFSR state, then its complement, then the next state. Also
// checks that the cycle is exactly 2*(2^W-1) vectors (maximal length, never
// the all-zero state), that `load` returns to the seed and the true phase,
// and that the vector holds while `en` is low.
module lfsr_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load, en;
  logic [9:0] s10;
  logic [4:0] s5;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lfsr dut10 (.clk(clk), .rst_n(rst_n), .load(load), .en(en), .state(s10));
  lfsr #(.WIDTH(5), .SEED(5'b10110)) dut5 (.clk(clk), .rst_n(rst_n), .load(load), .en(en), .state(s5));

  function automatic logic [9:0] next10(logic [9:0] s);
    return {s[8:0], s[9] ^ s[6]};
  endfunction
  function automatic logic [4:0] next5(logic [4:0] s);
    return {s[3:0], s[4] ^ s[2]};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] l10;
    logic [4:0] l5;
    int period10, period5, bad10, bad5;
    load = 1'b0; en = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(s10 == 10'b0101010101, "10-bit reset value is the seed");
    check(s5 == 5'b10110, "5-bit reset value is the seed");
    @(posedge clk); @(negedge clk);
    check(s10 == 10'b0101010101 && s5 == 5'b10110, "vector holds while en is low");
    // One full cycle of vectors.
    en = 1'b1;
    l10 = 10'b0101010101; l5 = 5'b10110;
    period10 = 0; period5 = 0; bad10 = 0; bad5 = 0;
    for (int i = 1; i <= 2046; i++) begin
      @(posedge clk); @(negedge clk);
      if (i % 2 == 0) l10 = next10(l10);
      if (s10 != ((i % 2) ? ~l10 : l10)) bad10++;
      if (i % 2 == 0 && s10 == 10'b0101010101 && period10 == 0) period10 = i;
      if (i <= 62) begin
        if (i % 2 == 0) l5 = next5(l5);
        if (s5 != ((i % 2) ? ~l5 : l5)) bad5++;
        if (i % 2 == 0 && s5 == 5'b10110 && period5 == 0) period5 = i;
      end
      if (i % 2 == 0) check(s10 != '0 && s5 != '0, "LFSR state never zero");
    end
    check(bad10 == 0, $sformatf("10-bit: %0d vectors differ from the reference", bad10));
    check(bad5 == 0, $sformatf("5-bit: %0d vectors differ from the reference", bad5));
    check(period10 == 2046, $sformatf("10-bit cycle %0d vectors, expected 2046", period10));
    check(period5 == 62, $sformatf("5-bit cycle %0d vectors, expected 62", period5));
    // Load in the complement phase wins over en and restores the true phase.
    @(posedge clk); @(negedge clk);
    check(s10 == ~10'b0101010101, "complement of the seed");
    load = 1'b1;
    @(posedge clk); @(negedge clk);
    check(s10 == 10'b0101010101 && s5 == 5'b10110, "load restores the seed");
    load = 1'b0;
    @(posedge clk); @(negedge clk);
    check(s10 == ~10'b0101010101, "complement after load");
    @(posedge clk); @(negedge clk);
    check(s10 == next10(10'b0101010101), "next state after the pair");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
