// tsv_stack_top_tb: end-to-end testbench of tsv_stack_top at its default
// size: three dies, two links of 8 data bits in groups of 4, 32 test vectors.
//
// Each link's TSVs run through its own tsv_fault_model. Per scenario the
// testbench sets defects on each link, pulses `bist_start` once, and checks:
//  - that both links are in test mode in exactly the same 32 cycles (the
//    parallel test) and that `test_done` follows one cycle later;
//  - each link's signature against the one worked out from the vectors it
//    actually drove, pushed through its defects;
//  - per-link and stack-wide repair flags against tsv_ref_pkg::ref_map;
//  - when a link is repairable, a stream of random words on both links at
//    once, with random `enable` stalls, arriving complete and in order.
// Mechanisms counted (each must happen at least once): parallel self-test,
// spare repair, time-division repair, unrepairable link, enable stall.
module tsv_stack_top_tb;
  import tsv_pkg::*;
  import tsv_ref_pkg::*;
  localparam int L = 2, DB = 8, GB = 4, G = 2, T = 10, VECTORS = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic bist_start, test_busy, test_done, repair_fail;
  logic [L-1:0] enable, multi_defect, link_fail, in_valid, in_ready, out_valid;
  logic [L-1:0][T-1:0] error_sig;
  repair_mode_e group_mode [L][G];
  logic [L-1:0][DB-1:0] in_data, out_data, tsv_data_tx, tsv_data_rx;
  logic [L-1:0][G-1:0] tsv_spare_tx, tsv_spare_rx;
  logic [L-1:0][2:0] tsv_ctrl_tx, tsv_ctrl_rx;
  logic [T-1:0] stuck0 [L], stuck1 [L], no_bridge [L];
  int checks = 0, failures = 0;
  int n_parallel = 0, n_spare = 0, n_tdma = 0, n_fail = 0, n_stall = 0;

  always #5 clk = ~clk;

  tsv_stack_top dut (
    .clk(clk), .rst_n(rst_n), .bist_start(bist_start), .enable(enable),
    .test_busy(test_busy), .test_done(test_done), .repair_fail(repair_fail),
    .error_sig(error_sig), .multi_defect(multi_defect), .link_fail(link_fail),
    .group_mode(group_mode), .in_valid(in_valid), .in_data(in_data), .in_ready(in_ready),
    .out_valid(out_valid), .out_data(out_data),
    .tsv_data_tx(tsv_data_tx), .tsv_spare_tx(tsv_spare_tx), .tsv_ctrl_tx(tsv_ctrl_tx),
    .tsv_data_rx(tsv_data_rx), .tsv_spare_rx(tsv_spare_rx), .tsv_ctrl_rx(tsv_ctrl_rx));

  for (genvar k = 0; k < L; k++) begin : g_tsvs
    tsv_fault_model #(.DATA_BITS(DB), .GROUPS(G)) u_tsvs (
      .tsv_data_tx(tsv_data_tx[k]), .tsv_spare_tx(tsv_spare_tx[k]), .tsv_ctrl_tx(tsv_ctrl_tx[k]),
      .stuck0(stuck0[k]), .stuck1(stuck1[k]), .bridge(no_bridge[k]),
      .tsv_data_rx(tsv_data_rx[k]), .tsv_spare_rx(tsv_spare_rx[k]), .tsv_ctrl_rx(tsv_ctrl_rx[k]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic self_test();
    logic [T-1:0] sig [L];
    int both, either, cyc;
    ref_map_t m;
    bit any_fail;
    @(negedge clk);
    bist_start = 1'b1;
    @(negedge clk);
    bist_start = 1'b0;
    both = 0; either = 0; cyc = 0;
    for (int k = 0; k < L; k++) sig[k] = '0;
    while (!test_done && cyc < 200) begin
      if (tsv_ctrl_tx[0][CTRL_TEST] && tsv_ctrl_tx[1][CTRL_TEST]) both++;
      if (tsv_ctrl_tx[0][CTRL_TEST] || tsv_ctrl_tx[1][CTRL_TEST]) either++;
      for (int k = 0; k < L; k++)
        if (tsv_ctrl_tx[k][CTRL_TEST]) begin
          logic [T-1:0] drv;
          drv = {tsv_spare_tx[k], tsv_data_tx[k]};
          sig[k] |= (((drv | stuck1[k]) & ~stuck0[k]) ^ drv);
        end
      cyc++;
      @(negedge clk);
    end
    check(both == VECTORS && either == VECTORS,
          $sformatf("links in test together for %0d cycles (either %0d), expected %0d", both, either, VECTORS));
    check(cyc == VECTORS + 1, $sformatf("stack test done after %0d cycles, expected %0d", cyc, VECTORS + 1));
    if (both == VECTORS) n_parallel++;
    any_fail = 1'b0;
    for (int k = 0; k < L; k++) begin
      check(error_sig[k] == sig[k] && sig[k] == (stuck0[k] | stuck1[k]),
            $sformatf("link %0d signature %b expected %b", k, error_sig[k], sig[k]));
      m = ref_map(128'(sig[k]), DB, GB);
      check(multi_defect[k] == m.two_slot && link_fail[k] == m.fail, $sformatf("link %0d flags", k));
      if (m.fail) any_fail = 1'b1;
      for (int g = 0; g < G; g++) begin
        if (group_mode[k][g] == MODE_SPARE) n_spare++;
        if (group_mode[k][g] == MODE_TDMA)  n_tdma++;
      end
      if (link_fail[k]) n_fail++;
    end
    check(repair_fail == any_fail, "stack repair_fail");
  endtask

  // Stream words on every repairable link at once.
  task automatic stream(input int words);
    logic [DB-1:0] q [L][$];
    int sent [L], got [L], cyc;
    for (int k = 0; k < L; k++) begin sent[k] = 0; got[k] = 0; end
    cyc = 0;
    while (cyc < 40 * words) begin
      bit all_done;
      @(negedge clk);
      for (int k = 0; k < L; k++) begin
        if (!in_valid[k] && !link_fail[k] && sent[k] < words) begin
          in_valid[k] = 1'b1;
          in_data[k] = DB'($urandom);
        end
        enable[k] = ($urandom % 6 != 0);
      end
      #1;
      for (int k = 0; k < L; k++)
        if (in_valid[k] && !enable[k]) n_stall++;
      @(posedge clk);
      for (int k = 0; k < L; k++)
        if (in_valid[k] && in_ready[k]) begin
          q[k].push_back(in_data[k]);
          sent[k]++;
          #0 in_valid[k] = 1'b0;
        end
      #2;
      for (int k = 0; k < L; k++)
        if (out_valid[k]) begin
          if (q[k].size() == 0) check(1'b0, $sformatf("link %0d: unexpected word", k));
          else check(out_data[k] == q[k].pop_front(), $sformatf("link %0d word %0d", k, got[k]));
          got[k]++;
        end
      cyc++;
      all_done = 1'b1;
      for (int k = 0; k < L; k++)
        if (!link_fail[k] && got[k] < words) all_done = 1'b0;
      if (all_done) break;
    end
    for (int k = 0; k < L; k++)
      if (!link_fail[k]) check(got[k] == words, $sformatf("link %0d: %0d of %0d words", k, got[k], words));
    @(negedge clk);
    enable = '1;
  endtask

  task automatic scenario(input logic [T-1:0] a0, input logic [T-1:0] a1,
                          input logic [T-1:0] b0, input logic [T-1:0] b1);
    stuck0[0] = a0; stuck1[0] = a1 & ~a0;
    stuck0[1] = b0; stuck1[1] = b1 & ~b0;
    self_test();
    stream(30);
  endtask

  initial begin
    bist_start = 1'b0; enable = '1; in_valid = '0; in_data = '0;
    for (int k = 0; k < L; k++) begin stuck0[k] = '0; stuck1[k] = '0; no_bridge[k] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    scenario('0, '0, 10'b00_0000_0001, '0);                          // clean / one defect
    scenario(10'b00_0000_0110, '0, '0, 10'b01_0000_0000);            // two defects / bad spare
    scenario(10'b00_1111_0000, '0, '0, 10'b00_0010_0000);            // unrepairable / one defect
    for (int r = 0; r < 10; r++)
      scenario(T'($urandom) & T'($urandom) & T'($urandom), T'($urandom) & T'($urandom) & T'($urandom),
               T'($urandom) & T'($urandom) & T'($urandom), T'($urandom) & T'($urandom) & T'($urandom));
    $display("mechanisms: parallel-tests %0d spare %0d tdma %0d unrepairable-links %0d enable-stalls %0d",
             n_parallel, n_spare, n_tdma, n_fail, n_stall);
    check(n_parallel > 0, "parallel self-test of all links happened");
    check(n_spare > 0, "spare repair happened");
    check(n_tdma > 0, "time-division repair happened");
    check(n_fail > 0, "an unrepairable link was reported");
    check(n_stall > 0, "an enable stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
