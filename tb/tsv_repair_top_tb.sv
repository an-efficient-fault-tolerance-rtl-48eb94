// tsv_repair_top_tb: end-to-end testbench of tsv_repair_top at its default
// size (8 data bits in two groups of 4, two spares, 32 test vectors).
//
// The top's TSV outputs go through tsv_fault_model back into its TSV inputs.
// Each scenario sets a defect pattern, runs the self-test, and then streams
// random words through the link with a random valid pattern and random
// `enable` gaps, comparing every output word in order with what was sent.
// The expected error signature is computed here by pushing the reference
// test vectors (states of x^10+x^7+1 from seed 0101010101, each followed by
// its complement) through the same defects; the expected
// repair mapping comes from tsv_ref_pkg. Also checked: the self-test length,
// one word per cycle without time division and one per two cycles with it,
// and data flowing out of reset before any test.
//
// Mechanisms counted (each must happen at least once): self-test runs,
// defect-free runs, spare repairs (shift-and-replace), two-slot time-division
// repairs, unrepairable groups detected, a faulty spare tolerated, bridge
// defects found, enable stalls, words held back during a second slot, and a
// self-test started while a two-slot word was half sent.
module tsv_repair_top_tb;
  import tsv_pkg::*;
  import tsv_ref_pkg::*;
  localparam int DB = 8, GB = 4, G = 2, T = 10, VECTORS = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic bist_start, enable, test_busy, test_done, multi_defect, repair_fail;
  logic [T-1:0] error_sig;
  repair_mode_e group_mode [G];
  logic in_valid, in_ready, out_valid;
  logic [DB-1:0] in_data, out_data;
  logic [DB-1:0] tsv_data_tx, tsv_data_rx;
  logic [G-1:0] tsv_spare_tx, tsv_spare_rx;
  logic [2:0] tsv_ctrl_tx, tsv_ctrl_rx;
  logic [T-1:0] stuck0, stuck1, bridge;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_restart;
  int n_tests, n_clean, n_spare, n_tdma, n_fail, n_bad_spare, n_bridge, n_enable_stall, n_slot_stall;

  always #5 clk = ~clk;

  tsv_repair_top dut (
    .clk(clk), .rst_n(rst_n), .bist_start(bist_start), .enable(enable),
    .test_busy(test_busy), .test_done(test_done), .error_sig(error_sig),
    .multi_defect(multi_defect), .repair_fail(repair_fail), .group_mode(group_mode),
    .in_valid(in_valid), .in_data(in_data), .in_ready(in_ready),
    .out_valid(out_valid), .out_data(out_data),
    .tsv_data_tx(tsv_data_tx), .tsv_spare_tx(tsv_spare_tx), .tsv_ctrl_tx(tsv_ctrl_tx),
    .tsv_data_rx(tsv_data_rx), .tsv_spare_rx(tsv_spare_rx), .tsv_ctrl_rx(tsv_ctrl_rx));

  tsv_fault_model #(.DATA_BITS(DB), .GROUPS(G)) u_tsvs (
    .tsv_data_tx(tsv_data_tx), .tsv_spare_tx(tsv_spare_tx), .tsv_ctrl_tx(tsv_ctrl_tx),
    .stuck0(stuck0), .stuck1(stuck1), .bridge(bridge),
    .tsv_data_rx(tsv_data_rx), .tsv_spare_rx(tsv_spare_rx), .tsv_ctrl_rx(tsv_ctrl_rx));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Same defect function as the TSV model, applied to a vector.
  function automatic logic [T-1:0] through_tsvs(input logic [T-1:0] v);
    logic [T-1:0] r;
    r = v;
    for (int i = 0; i + 1 < T; i++)
      if (bridge[i]) begin
        r[i] = v[i] & v[i+1];
        r[i+1] = v[i] & v[i+1];
      end
    return (r | stuck1) & ~stuck0;
  endfunction

  function automatic logic [T-1:0] expected_signature();
    logic [T-1:0] v, vec, sig;
    v = 10'b0101010101;
    sig = '0;
    for (int t = 0; t < VECTORS; t++) begin
      vec = (t % 2) ? ~v : v;
      sig |= through_tsvs(vec) ^ vec;
      if (t % 2) v = {v[8:0], v[9] ^ v[6]};
    end
    return sig;
  endfunction

  // Run the self-test and check its length and result.
  task automatic self_test(output logic [T-1:0] sig);
    int test_cycles;
    ref_map_t m;
    @(negedge clk);
    bist_start = 1'b1;
    @(negedge clk);
    bist_start = 1'b0;
    test_cycles = 0;
    while (!test_done) begin
      if (tsv_ctrl_tx[CTRL_TEST]) test_cycles++;
      check(!in_ready, "no data accepted during the self-test");
      @(negedge clk);
      if (test_cycles > 1000) break;
    end
    n_tests++;
    check(test_cycles == VECTORS, $sformatf("self-test took %0d vector cycles, expected %0d",
                                            test_cycles, VECTORS));
    sig = expected_signature();
    check(error_sig == sig, $sformatf("error signature %b expected %b", error_sig, sig));
    m = ref_map(128'(sig), DB, GB);
    check(multi_defect == m.two_slot && repair_fail == m.fail,
          $sformatf("flags two_slot %b fail %b expected %b %b", multi_defect, repair_fail,
                    m.two_slot, m.fail));
    for (int g = 0; g < G; g++) begin
      logic [GB:0] f;
      int nf;
      f = {sig[DB + g], sig[g*GB +: GB]};
      nf = $countones(f);
      if (nf == 0) n_clean++;
      if (group_mode[g] == MODE_SPARE) n_spare++;
      if (group_mode[g] == MODE_TDMA) n_tdma++;
      if (group_mode[g] == MODE_FAIL) n_fail++;
      if (f[GB]) n_bad_spare++;
    end
    if ((bridge & sig) != 0) n_bridge++;
  endtask

  // Stream `words` random words, check order, content and rate.
  task automatic stream(input int words, input bit gaps);
    logic [DB-1:0] sent_q[$];
    int sent, got, cyc, busy_cyc, slots;
    sent = 0; got = 0; cyc = 0; busy_cyc = 0;
    slots = multi_defect ? 2 : 1;
    fork
      begin : producer
        while (sent < words) begin
          @(negedge clk);
          if (!in_valid || in_ready_seen) begin
            in_valid = gaps ? ($urandom % 4 != 0) : 1'b1;
            in_data = DB'($urandom);
          end
          enable = gaps ? ($urandom % 8 != 0) : 1'b1;
          in_ready_seen = 1'b0;
          #1;
          if (in_valid && !enable) n_enable_stall++;
          if (in_valid && enable && !in_ready) n_slot_stall++;
          if (in_valid) busy_cyc++;
          if (in_valid && in_ready) begin
            sent_q.push_back(in_data);
            sent++;
            in_ready_seen = 1'b1;
          end
        end
        @(negedge clk);
        in_valid = 1'b0;
        enable = 1'b1;
      end
      begin : consumer
        while (got < words && cyc < 20 * words + 100) begin
          @(posedge clk);
          #2;
          cyc++;
          if (out_valid) begin
            if (sent_q.size() == 0) check(1'b0, "word out that was never sent");
            else check(out_data == sent_q.pop_front(), $sformatf("word %0d: out %b", got, out_data));
            got++;
          end
        end
        check(got == words, $sformatf("%0d of %0d words arrived", got, words));
      end
    join
    if (!gaps)
      check(busy_cyc == words * slots, $sformatf("%0d words took %0d cycles, expected %0d",
                                                 words, busy_cyc, words * slots));
  endtask

  logic in_ready_seen;

  // A self-test started while a two-slot word is half sent: the word must
  // still arrive once, whole, after the test.
  task automatic restart_mid_word();
    logic [DB-1:0] w;
    int outs;
    logic [DB-1:0] last_out;
    stuck0 = 10'b00_0000_0110; stuck1 = '0; bridge = '0;
    begin
      logic [T-1:0] sig;
      self_test(sig);
    end
    check(multi_defect, "two-slot mode for the restart case");
    outs = 0;
    w = DB'($urandom);
    @(negedge clk);
    in_valid = 1'b1;
    in_data = w;
    bist_start = 1'b1;           // slot 0 goes out in this cycle
    @(negedge clk);
    bist_start = 1'b0;
    for (int c = 0; c < VECTORS + 10; c++) begin
      #1;
      if (in_ready) break;
      @(negedge clk);
    end
    @(posedge clk);
    @(negedge clk);
    in_valid = 1'b0;
    repeat (3) begin
      if (out_valid) begin outs++; last_out = out_data; end
      @(negedge clk);
    end
    check(outs == 1 && last_out == w, $sformatf("restarted word: %0d outputs, %b expected %b", outs, last_out, w));
    n_restart++;
  endtask

  task automatic scenario(input logic [T-1:0] s0, input logic [T-1:0] s1, input logic [T-1:0] br);
    logic [T-1:0] sig;
    stuck0 = s0; stuck1 = s1; bridge = br;
    self_test(sig);
    if (!repair_fail) begin
      stream(40, 1'b0);
      stream(60, 1'b1);
    end
  endtask

  initial begin
    bist_start = 1'b0; enable = 1'b1; in_valid = 1'b0; in_data = '0; in_ready_seen = 1'b0;
    stuck0 = '0; stuck1 = '0; bridge = '0;
    n_tests = 0; n_clean = 0; n_spare = 0; n_tdma = 0; n_fail = 0; n_bad_spare = 0;
    n_bridge = 0; n_enable_stall = 0; n_slot_stall = 0; n_restart = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Out of reset, before any test: identity mapping on a clean link.
    stream(20, 1'b0);
    // The Fig.-style cases: clean link, one defect, two defects in a group.
    scenario('0, '0, '0);
    scenario(10'b00_0000_0001, '0, '0);
    scenario('0, 10'b00_0000_0110, '0);
    scenario(10'b00_0010_0000, 10'b00_1000_0000, '0);
    scenario('0, '0, 10'b00_0000_0100);                 // bridge TSV 2-3
    scenario(10'b01_0000_0000, '0, '0);                 // faulty spare only
    scenario(10'b00_0000_0111, '0, '0);                 // three defects, still repairable
    scenario(10'b00_0000_0111, 10'b01_0000_0000, '0);   // four defects: unrepairable
    restart_mid_word();                                 // test started mid-word
    scenario('0, '0, '0);                               // repaired link re-tested clean
    for (int r = 0; r < 12; r++)
      scenario(T'($urandom) & T'($urandom) & T'($urandom), '0,
               T'($urandom) & T'($urandom) & T'($urandom) & T'($urandom));
    $display("mechanisms: tests %0d clean-groups %0d spare %0d tdma %0d unrepairable %0d bad-spare %0d bridge %0d enable-stall %0d slot-stall %0d",
             n_tests, n_clean, n_spare, n_tdma, n_fail, n_bad_spare, n_bridge, n_enable_stall, n_slot_stall);
    check(n_tests > 0,        "self-test ran");
    check(n_clean > 0,        "a defect-free group was seen");
    check(n_spare > 0,        "spare repair happened");
    check(n_tdma > 0,         "two-slot time-division repair happened");
    check(n_fail > 0,         "an unrepairable group was reported");
    check(n_bad_spare > 0,    "a defective spare was seen");
    check(n_bridge > 0,       "a bridge defect was found");
    check(n_enable_stall > 0, "enable stall happened");
    check(n_slot_stall > 0,   "a word was held for its second slot");
    check(n_restart > 0,      "a self-test interrupted a two-slot word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
