// bisr_rx_tb: self-checking testbench of bisr_rx (8 data bits, groups of 4).
//
// Plays the transmitting die and the TSVs: for each signature it puts every
// word's bits on the lanes and in the slots given by the reference mapping of
// tsv_ref_pkg, and fills every other lane (faulty or unused) with random
// values. Checks that each word comes out whole and unchanged, that
// out_valid rises exactly one cycle after the word's last slot and only
// then, and that nothing is captured while the test-mode control TSV is high.
module bisr_rx_tb;
  import tsv_pkg::*;
  import tsv_ref_pkg::*;
  localparam int DB = 8, GB = 4, G = 2, T = 10;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic two_slot, out_valid;
  logic [DB-1:0][2:0] bit_lane;
  logic [DB-1:0] bit_slot, tsv_data_rx, out_data;
  logic [G-1:0] tsv_spare_rx;
  logic [2:0] tsv_ctrl_rx;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bisr_rx dut (.clk(clk), .rst_n(rst_n), .bit_lane(bit_lane), .bit_slot(bit_slot),
               .two_slot(two_slot), .tsv_data_rx(tsv_data_rx), .tsv_spare_rx(tsv_spare_rx),
               .tsv_ctrl_rx(tsv_ctrl_rx), .out_valid(out_valid), .out_data(out_data));

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

  task automatic recv_words(input logic [T-1:0] sig, input int words);
    ref_map_t m;
    logic [DB-1:0] word;
    logic [T-1:0] lanes;
    int nslots;
    m = ref_map(128'(sig), DB, GB);
    for (int b = 0; b < DB; b++) begin
      bit_lane[b] = 3'(m.lane[b]);
      bit_slot[b] = 1'(m.slot[b]);
    end
    two_slot = m.two_slot;
    nslots = m.two_slot ? 2 : 1;
    for (int w = 0; w < words; w++) begin
      word = DB'($urandom);
      for (int s = 0; s < nslots; s++) begin
        @(negedge clk);
        check(!out_valid || s == 0, "out_valid only after the last slot");
        lanes = T'($urandom);
        for (int b = 0; b < DB; b++)
          if (m.slot[b] == s) lanes[tsv_index(b / GB, m.lane[b], DB, GB)] = word[b];
        {tsv_spare_rx, tsv_data_rx} = lanes;
        tsv_ctrl_rx = {1'(s), 1'b1, 1'b0};
      end
      @(negedge clk);
      tsv_ctrl_rx = 3'b000;
      {tsv_spare_rx, tsv_data_rx} = T'($urandom);
      check(out_valid && out_data == word,
            $sformatf("sig %b word %0d: out %b valid %b expected %b", sig, w, out_data, out_valid, word));
      // an idle cycle in between every other word
      if (w % 2 == 1) begin
        @(negedge clk);
        check(!out_valid, "no out_valid on an idle cycle");
      end
    end
  endtask

  initial begin
    logic [DB-1:0] held;
    two_slot = 1'b0; tsv_ctrl_rx = '0; tsv_data_rx = '0; tsv_spare_rx = '0;
    for (int b = 0; b < DB; b++) begin bit_lane[b] = 3'(b % GB); bit_slot[b] = 1'b0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    recv_words('0, 10);
    held = out_data;
    // Test mode: slot-valid is ignored, nothing captured.
    repeat (10) begin
      @(negedge clk);
      tsv_ctrl_rx = 3'b011;
      {tsv_spare_rx, tsv_data_rx} = T'($urandom);
      #1;
      check(!out_valid && out_data == held, "nothing received in test mode");
    end
    @(negedge clk);
    tsv_ctrl_rx = '0;
    #1;
    check(!out_valid && out_data == held, "nothing received in test mode");
    recv_words(10'b00_0000_1000, 10);
    recv_words(10'b00_0000_0110, 10);
    recv_words(10'b01_1100_0001, 10);
    recv_words(10'b11_0000_0000, 10);
    for (int r = 0; r < 40; r++) begin
      logic [T-1:0] s;
      s = T'($urandom) & T'($urandom) & T'($urandom);
      if (!ref_map(128'(s), DB, GB).fail) recv_words(s, 4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
