// tsv_repair_sizes_tb: runs the whole link at the sizes the design is
// evaluated at, each in its own tsv_link_harness, side by side:
//  - 4, 8, 16, 32 and 64 data bits in groups of four TSVs plus one spare;
//  - 100 data TSVs with 10, 2 and 1 spares: ten groups of ten, two groups
//    of fifty, one group of a hundred.
// Each harness runs random defect scenarios (self-test, signature, repair
// mapping, data stream). Counts a failure if, over all sizes, no spare
// repair, no time-division repair or no unrepairable group occurred.
module tsv_repair_sizes_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  localparam int H = 8;
  logic fin [H];
  int c [H], f [H], ns [H], nt [H], nf [H];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tsv_link_harness #(.DATA_BITS(4),   .GROUP_BITS(4),  .SCENARIOS(30)) h4
    (.clk(clk), .rst_n(rst_n), .finished(fin[0]), .checks(c[0]), .failures(f[0]), .n_spare(ns[0]), .n_tdma(nt[0]), .n_fail(nf[0]));
  tsv_link_harness #(.DATA_BITS(8),   .GROUP_BITS(4),  .SCENARIOS(30)) h8
    (.clk(clk), .rst_n(rst_n), .finished(fin[1]), .checks(c[1]), .failures(f[1]), .n_spare(ns[1]), .n_tdma(nt[1]), .n_fail(nf[1]));
  tsv_link_harness #(.DATA_BITS(16),  .GROUP_BITS(4),  .SCENARIOS(20)) h16
    (.clk(clk), .rst_n(rst_n), .finished(fin[2]), .checks(c[2]), .failures(f[2]), .n_spare(ns[2]), .n_tdma(nt[2]), .n_fail(nf[2]));
  tsv_link_harness #(.DATA_BITS(32),  .GROUP_BITS(4),  .SCENARIOS(20)) h32
    (.clk(clk), .rst_n(rst_n), .finished(fin[3]), .checks(c[3]), .failures(f[3]), .n_spare(ns[3]), .n_tdma(nt[3]), .n_fail(nf[3]));
  tsv_link_harness #(.DATA_BITS(64),  .GROUP_BITS(4),  .SCENARIOS(20)) h64
    (.clk(clk), .rst_n(rst_n), .finished(fin[4]), .checks(c[4]), .failures(f[4]), .n_spare(ns[4]), .n_tdma(nt[4]), .n_fail(nf[4]));
  tsv_link_harness #(.DATA_BITS(100), .GROUP_BITS(10), .SCENARIOS(20)) h100
    (.clk(clk), .rst_n(rst_n), .finished(fin[5]), .checks(c[5]), .failures(f[5]), .n_spare(ns[5]), .n_tdma(nt[5]), .n_fail(nf[5]));
  tsv_link_harness #(.DATA_BITS(100), .GROUP_BITS(50), .SCENARIOS(10)) h100g50
    (.clk(clk), .rst_n(rst_n), .finished(fin[6]), .checks(c[6]), .failures(f[6]), .n_spare(ns[6]), .n_tdma(nt[6]), .n_fail(nf[6]));
  tsv_link_harness #(.DATA_BITS(100), .GROUP_BITS(100), .SCENARIOS(10)) h100g100
    (.clk(clk), .rst_n(rst_n), .finished(fin[7]), .checks(c[7]), .failures(f[7]), .n_spare(ns[7]), .n_tdma(nt[7]), .n_fail(nf[7]));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sp, td, nfl;
    bit all;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    do begin
      @(posedge clk);
      all = 1'b1;
      for (int i = 0; i < H; i++) if (!fin[i]) all = 1'b0;
    end while (!all);
    sp = 0; td = 0; nfl = 0;
    for (int i = 0; i < H; i++) begin
      checks += c[i]; failures += f[i]; sp += ns[i]; td += nt[i]; nfl += nf[i];
      $display("size %0d: checks %0d failures %0d spare %0d tdma %0d unrepairable %0d",
               i, c[i], f[i], ns[i], nt[i], nf[i]);
    end
    checks += 3;
    if (sp == 0)  begin failures++; $display("FAIL: no spare repair"); end
    if (td == 0)  begin failures++; $display("FAIL: no time-division repair"); end
    if (nfl == 0) begin failures++; $display("FAIL: no unrepairable group"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
