// bisr_tx_tb: self-checking testbench of bisr_tx (8 data bits, groups of 4).
//
// Checks, against the reference mapping of tsv_ref_pkg and a reference LFSR
// (x^10+x^7+1, seed 0101010101):
//  - test mode: all ten TSVs carry successive LFSR states, each followed by
//    its complement, the test control
//    TSV is high and no word is accepted;
//  - for a set of signatures (none, one fault, two faults in one group,
//    faults in both groups, a faulty spare): the TSV values of every slot,
//    the control TSVs, and the number of cycles each word takes (1, or 2 when
//    any group needs two slots);
//  - `enable` low: nothing accepted and nothing sent.
module bisr_tx_tb;
  import tsv_pkg::*;
  import tsv_ref_pkg::*;
  localparam int DB = 8, GB = 4, G = 2, T = 10;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic enable, test_mode, two_slot, in_valid, in_ready;
  logic [DB-1:0][2:0] bit_lane;
  logic [DB-1:0] bit_slot;
  logic [DB-1:0] in_data, tsv_data_tx;
  logic [G-1:0] tsv_spare_tx;
  logic [2:0] tsv_ctrl_tx;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bisr_tx dut (.clk(clk), .rst_n(rst_n), .enable(enable), .test_mode(test_mode),
               .bit_lane(bit_lane), .bit_slot(bit_slot), .two_slot(two_slot),
               .in_valid(in_valid), .in_data(in_data), .in_ready(in_ready),
               .tsv_data_tx(tsv_data_tx), .tsv_spare_tx(tsv_spare_tx), .tsv_ctrl_tx(tsv_ctrl_tx));

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

  task automatic set_config(input logic [T-1:0] sig, output ref_map_t m);
    m = ref_map(128'(sig), DB, GB);
    for (int b = 0; b < DB; b++) begin
      bit_lane[b] = 3'(m.lane[b]);
      bit_slot[b] = 1'(m.slot[b]);
    end
    two_slot = m.two_slot;
  endtask

  // Send `words` random words; check TSV values of every slot and cycle counts.
  task automatic send_words(input logic [T-1:0] sig, input int words);
    ref_map_t m;
    logic [T-1:0] exp_tsv;
    int cycles, exp_cycles;
    set_config(sig, m);
    exp_cycles = m.two_slot ? 2 : 1;
    for (int w = 0; w < words; w++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_data = DB'($urandom);
      cycles = 0;
      forever begin
        #1;
        exp_tsv = '0;
        for (int b = 0; b < DB; b++)
          if (m.slot[b] == cycles) exp_tsv[tsv_index(b / GB, m.lane[b], DB, GB)] = in_data[b];
        check({tsv_spare_tx, tsv_data_tx} == exp_tsv,
              $sformatf("sig %b word %0d slot %0d: TSVs %b expected %b", sig, w, cycles,
                        {tsv_spare_tx, tsv_data_tx}, exp_tsv));
        check(tsv_ctrl_tx == {1'(cycles), 1'b1, 1'b0}, $sformatf("ctrl %b in slot %0d", tsv_ctrl_tx, cycles));
        cycles++;
        if (in_ready) break;
        @(negedge clk);
        if (cycles > 4) break;
      end
      check(cycles == exp_cycles, $sformatf("sig %b: word took %0d cycles, expected %0d", sig, cycles, exp_cycles));
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    ref_map_t m;
    logic [T-1:0] v;
    enable = 1'b1; test_mode = 1'b0; in_valid = 1'b0; in_data = '0;
    set_config('0, m);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Test mode.
    @(negedge clk);
    test_mode = 1'b1;
    in_valid = 1'b1;
    v = 10'b0101010101;
    for (int t = 0; t < 40; t++) begin
      #1;
      check({tsv_spare_tx, tsv_data_tx} == ((t % 2) ? ~v : v),
            $sformatf("test vector %0d: %b expected %b", t, {tsv_spare_tx, tsv_data_tx},
                      (t % 2) ? ~v : v));
      check(tsv_ctrl_tx == 3'b001 && !in_ready, "test mode control TSVs, no data accepted");
      if (t % 2) v = {v[8:0], v[9] ^ v[6]};
      @(negedge clk);
    end
    test_mode = 1'b0;
    #1;
    check(in_ready, "word held through test mode is taken afterwards");
    @(negedge clk);
    in_valid = 1'b0;
    // Normal and repaired modes.
    send_words('0, 20);
    send_words(10'b00_0000_0100, 20);
    send_words(10'b00_0000_0110, 20);
    send_words(10'b00_0110_0000, 20);
    send_words(10'b10_0101_0001, 20);
    send_words(10'b01_0000_0000, 20);
    send_words(10'b00_0000_1110, 20);
    for (int r = 0; r < 30; r++) send_words(T'($urandom) & T'($urandom) & T'($urandom), 5);
    // Enable low.
    set_config('0, m);
    @(negedge clk);
    enable = 1'b0;
    in_valid = 1'b1;
    repeat (3) begin
      #1;
      check(!in_ready && tsv_ctrl_tx == 3'b000 && {tsv_spare_tx, tsv_data_tx} == '0,
            "enable low: nothing sent");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
