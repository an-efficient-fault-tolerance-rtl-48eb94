// tsv_link_harness: drives one tsv_repair_top of a given size through a
// series of random defect scenarios (testbench use only).
//
// For each scenario it picks, per group, a random number of defective TSVs
// (mostly none or one, sometimes up to half the group, rarely all of it;
// repeated picks may hit the same TSV), each stuck-at-0 or stuck-at-1, runs the
// self-test, and checks:
//  - the self-test length (TEST_VECTORS cycles with the test control TSV up);
//  - the error signature against the one worked out from the vectors the
//    lower die actually drove, pushed through the injected defects, and that
//    it names exactly the defective TSVs;
//  - the time-division and unrepairable flags against tsv_ref_pkg::ref_map;
//  - when repairable, that a stream of random words arrives complete and in
//    order at one word per cycle, or one per two cycles with time division.
// `finished` rises when all scenarios are done; `checks`, `failures` and the
// mechanism counters are then final.
module tsv_link_harness #(
  parameter int unsigned DATA_BITS    = 8,
  parameter int unsigned GROUP_BITS   = 4,
  parameter int unsigned TEST_VECTORS = 32,
  parameter int unsigned SCENARIOS    = 10,
  parameter int unsigned WORDS        = 30
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   n_spare,
  output int   n_tdma,
  output int   n_fail
);
  import tsv_pkg::*;
  import tsv_ref_pkg::*;
  localparam int DB = DATA_BITS, GB = GROUP_BITS, G = DB / GB, T = DB + G;

  logic bist_start, enable, test_busy, test_done, multi_defect, repair_fail;
  logic [T-1:0] error_sig, stuck0, stuck1, bridge;
  repair_mode_e group_mode [G];
  logic in_valid, in_ready, out_valid;
  logic [DB-1:0] in_data, out_data, tsv_data_tx, tsv_data_rx;
  logic [G-1:0] tsv_spare_tx, tsv_spare_rx;
  logic [2:0] tsv_ctrl_tx, tsv_ctrl_rx;

  tsv_repair_top #(.DATA_BITS(DB), .GROUP_BITS(GB), .TEST_VECTORS(TEST_VECTORS)) dut (
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
      $display("FAIL (%0d bits, groups of %0d): %s", DB, GB, what);
    end
  endtask

  task automatic pick_defects();
    stuck0 = '0; stuck1 = '0; bridge = '0;
    for (int g = 0; g < G; g++) begin
      int k, r;
      r = $urandom % 8;              // mostly few defects, so that big links stay repairable
      if (r < 4)       k = 0;
      else if (r < 6)  k = 1;
      else if (r == 6) k = 2 + $urandom % (GB / 2 - 1 + 1);
      else if (G <= 2) k = $urandom % (GB + 2);
      else             k = (($urandom % G) == 0) ? GB : 1;
      for (int j = 0; j < k; j++) begin
        int lane, idx;
        lane = $urandom % (GB + 1);
        idx = (lane == GB) ? DB + g : g * GB + lane;
        if ($urandom % 2) stuck0[idx] = 1'b1;
        else              stuck1[idx] = 1'b1;
      end
    end
    stuck1 &= ~stuck0;
  endtask

  task automatic self_test();
    logic [T-1:0] drv, sig;
    int test_cycles;
    ref_map_t m;
    @(negedge clk);
    bist_start = 1'b1;
    @(negedge clk);
    bist_start = 1'b0;
    test_cycles = 0;
    sig = '0;
    while (!test_done && test_cycles <= 4 * TEST_VECTORS) begin
      if (tsv_ctrl_tx[CTRL_TEST]) begin
        test_cycles++;
        drv = {tsv_spare_tx, tsv_data_tx};
        sig |= (((drv | stuck1) & ~stuck0) ^ drv);
      end
      @(negedge clk);
    end
    check(test_cycles == TEST_VECTORS, $sformatf("self-test %0d cycles", test_cycles));
    check(error_sig == sig, $sformatf("signature %h expected %h", error_sig, sig));
    check(error_sig == (stuck0 | stuck1), "signature names exactly the defective TSVs");
    m = ref_map(128'(sig), DB, GB);
    check(multi_defect == m.two_slot && repair_fail == m.fail, "repair flags");
    for (int g = 0; g < G; g++) begin
      if (group_mode[g] == MODE_SPARE) n_spare++;
      if (group_mode[g] == MODE_TDMA)  n_tdma++;
      if (group_mode[g] == MODE_FAIL)  n_fail++;
    end
  endtask

  task automatic stream();
    logic [DB-1:0] sent_q[$];
    int got, cycles, slots;
    got = 0; cycles = 0;
    slots = multi_defect ? 2 : 1;
    for (int w = 0; w < int'(WORDS); w++) begin
      @(negedge clk);
      in_valid = 1'b1;
      for (int b = 0; b < DB; b++) in_data[b] = 1'($urandom);
      forever begin
        #1;
        cycles++;
        if (in_ready) break;
        @(negedge clk);
      end
      sent_q.push_back(in_data);
      @(posedge clk);
      #2;
      if (out_valid) begin
        check(out_data == sent_q.pop_front(), "word content");
        got++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (3) begin
      @(posedge clk);
      #2;
      if (out_valid) begin
        check(out_data == sent_q.pop_front(), "word content");
        got++;
      end
    end
    check(got == int'(WORDS), $sformatf("%0d of %0d words arrived", got, WORDS));
    check(cycles == int'(WORDS) * slots, $sformatf("%0d words in %0d cycles", WORDS, cycles));
  endtask

  initial begin
    finished = 1'b0; checks = 0; failures = 0; n_spare = 0; n_tdma = 0; n_fail = 0;
    bist_start = 1'b0; enable = 1'b1; in_valid = 1'b0; in_data = '0;
    stuck0 = '0; stuck1 = '0; bridge = '0;
    @(posedge rst_n);
    for (int s = 0; s < int'(SCENARIOS); s++) begin
      pick_defects();
      self_test();
      if (!repair_fail) stream();
    end
    finished = 1'b1;
  end
endmodule
