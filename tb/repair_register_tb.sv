// repair_register_tb: self-checking testbench of repair_register
// (8 data bits, groups of 4, so signature bits 8 and 9 are the spares).
//
// Checks the identity mapping after reset, that nothing changes without
// `load`, and for a set of hand-picked and random signatures that the
// registered selects after a load match a reference mapping computed here
// (healthy lanes of each group in order, spare last; bits beyond the healthy
// count go in slot 1), with the group modes and the link-wide flags.
module repair_register_tb;
  import tsv_pkg::*;
  localparam int DB = 8, GB = 4, G = 2, T = 10;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load;
  logic [T-1:0] sig_in, error_sig;
  logic [DB-1:0][2:0] bit_lane;
  logic [DB-1:0] bit_slot;
  repair_mode_e mode [G];
  logic two_slot, repair_fail;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  repair_register dut (.clk(clk), .rst_n(rst_n), .load(load), .sig_in(sig_in),
                       .error_sig(error_sig), .bit_lane(bit_lane), .bit_slot(bit_slot),
                       .mode(mode), .two_slot(two_slot), .repair_fail(repair_fail));

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

  task automatic check_map(input logic [T-1:0] s);
    bit ok, any_two, any_fail;
    ok = 1'b1; any_two = 1'b0; any_fail = 1'b0;
    for (int g = 0; g < G; g++) begin
      int hq[$];
      int h;
      repair_mode_e em;
      logic [4:0] f;
      f = {s[DB + g], s[g*GB +: GB]};
      for (int l = 0; l <= GB; l++) if (!f[l]) hq.push_back(l);
      h = hq.size();
      for (int i = 0; i < GB; i++) begin
        int b, el, es;
        b = g * GB + i;
        if (i < h)          begin el = hq[i];     es = 0; end
        else if (i - h < h) begin el = hq[i - h]; es = 1; end
        else                begin el = 0;         es = 1; end
        if (32'(bit_lane[b]) != el || 32'(bit_slot[b]) != es) ok = 1'b0;
      end
      em = (2 * h < GB) ? MODE_FAIL : (h < GB) ? MODE_TDMA : (f[3:0] != 0) ? MODE_SPARE : MODE_NORMAL;
      if (mode[g] != em) ok = 1'b0;
      if (h < GB) any_two = 1'b1;
      if (2 * h < GB) any_fail = 1'b1;
    end
    check(ok && error_sig == s && two_slot == any_two && repair_fail == any_fail,
          $sformatf("signature %b", s));
  endtask

  initial begin
    logic [T-1:0] s;
    load = 1'b0;
    sig_in = 10'b11_1111_1111;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check_map('0);  // identity after reset
    @(negedge clk);
    check_map('0);  // no load: unchanged
    foreach (s_list[i]) begin
      sig_in = s_list[i];
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      sig_in = T'($urandom);
      @(negedge clk);
      check_map(s_list[i]);
    end
    for (int r = 0; r < 200; r++) begin
      s = T'($urandom) & T'($urandom);
      sig_in = s;
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      @(negedge clk);
      check_map(s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [T-1:0] s_list [6] = '{10'b00_0000_0000, 10'b00_0000_0001, 10'b00_0000_0110,
                               10'b10_1011_0000, 10'b01_0111_0111, 10'b00_1000_0100};
endmodule
