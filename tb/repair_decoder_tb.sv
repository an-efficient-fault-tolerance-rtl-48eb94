// repair_decoder_tb: self-checking testbench of repair_decoder.
//
// Exhaustive over all 2^(N+1) signatures of a group, for N = 4 (default) and
// N = 8. The expected mapping is built here independently: the list of
// healthy lanes (data lanes in order, spare last) is filled in a queue, and
// bit b is expected on entry b in slot 0, or on entry b-H in slot 1. The
// named cases of the four-bit group are also checked by hand: no fault, one
// fault shifted onto the spare, two faults sent as a three-bit and a one-bit
// bundle, and too many faults.
module repair_decoder_tb;
  import tsv_pkg::*;
  int checks = 0, failures = 0;

  logic [3:0]      sd4;  logic ss4;
  logic [3:0][2:0] lane4; logic [3:0] slot4; repair_mode_e mode4;
  logic two4, fail4; logic [2:0] h4;
  logic [7:0]      sd8;  logic ss8;
  logic [7:0][3:0] lane8; logic [7:0] slot8; repair_mode_e mode8;
  logic two8, fail8; logic [3:0] h8;

  repair_decoder dut4 (.sig_data(sd4), .sig_spare(ss4), .bit_lane(lane4), .bit_slot(slot4),
                       .mode(mode4), .two_slot(two4), .unrepairable(fail4), .healthy(h4));
  repair_decoder #(.GROUP_BITS(8)) dut8 (.sig_data(sd8), .sig_spare(ss8), .bit_lane(lane8),
                       .bit_slot(slot8), .mode(mode8), .two_slot(two8), .unrepairable(fail8),
                       .healthy(h8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model: returns expected lane/slot of every bit and the class.
  task automatic expect_map(input int n, input logic [15:0] faulty,
                            output int e_lane[16], output int e_slot[16],
                            output int e_h, output repair_mode_e e_mode);
    int healthy_q[$];
    for (int l = 0; l <= n; l++) if (!faulty[l]) healthy_q.push_back(l);
    e_h = healthy_q.size();
    for (int b = 0; b < n; b++) begin
      if (b < e_h)                  begin e_lane[b] = healthy_q[b];       e_slot[b] = 0; end
      else if (b - e_h < e_h)       begin e_lane[b] = healthy_q[b - e_h]; e_slot[b] = 1; end
      else                          begin e_lane[b] = 0;                  e_slot[b] = 1; end
    end
    if (2 * e_h < n)                 e_mode = MODE_FAIL;
    else if (e_h < n)                e_mode = MODE_TDMA;
    else if ((faulty & ((16'd1 << n) - 1)) != 0) e_mode = MODE_SPARE;
    else                             e_mode = MODE_NORMAL;
  endtask

  initial begin
    int e_lane[16], e_slot[16], e_h;
    repair_mode_e e_mode;
    bit ok;
    // Named four-bit cases.
    sd4 = 4'b0000; ss4 = 1'b0; #1;
    check(mode4 == MODE_NORMAL && lane4 == {3'd3, 3'd2, 3'd1, 3'd0} && slot4 == 4'b0000,
          "no fault: identity mapping");
    sd4 = 4'b0010; ss4 = 1'b0; #1;
    check(mode4 == MODE_SPARE && lane4 == {3'd4, 3'd3, 3'd2, 3'd0} && slot4 == 4'b0000,
          "TSV 2 faulty: bits 1..3 shift up, bit 3 on the spare");
    sd4 = 4'b0110; ss4 = 1'b0; #1;
    check(mode4 == MODE_TDMA && two4 && h4 == 3 && slot4 == 4'b1000 &&
          lane4[0] == 0 && lane4[1] == 3 && lane4[2] == 4 && lane4[3] == 0,
          "TSV 2 and 3 faulty: three bits in slot 0, last bit in slot 1");
    sd4 = 4'b0111; ss4 = 1'b0; #1;
    check(mode4 == MODE_TDMA && !fail4, "three faults still repairable in two slots");
    sd4 = 4'b0111; ss4 = 1'b1; #1;
    check(mode4 == MODE_FAIL && fail4, "four faults: unrepairable");
    sd4 = 4'b0000; ss4 = 1'b1; #1;
    check(mode4 == MODE_NORMAL && !two4, "faulty spare only: normal");
    // Exhaustive, N = 4.
    for (int s = 0; s < 32; s++) begin
      {ss4, sd4} = 5'(s); #1;
      expect_map(4, 16'(s), e_lane, e_slot, e_h, e_mode);
      ok = (mode4 == e_mode) && (32'(h4) == e_h) && (two4 == (e_h < 4)) && (fail4 == (2 * e_h < 4));
      for (int b = 0; b < 4; b++)
        if (32'(lane4[b]) != e_lane[b] || 32'(slot4[b]) != e_slot[b]) ok = 1'b0;
      check(ok, $sformatf("N=4 signature %b", 5'(s)));
    end
    // Exhaustive, N = 8.
    for (int s = 0; s < 512; s++) begin
      {ss8, sd8} = 9'(s); #1;
      expect_map(8, 16'(s), e_lane, e_slot, e_h, e_mode);
      ok = (mode8 == e_mode) && (32'(h8) == e_h) && (two8 == (e_h < 8)) && (fail8 == (2 * e_h < 8));
      for (int b = 0; b < 8; b++)
        if (32'(lane8[b]) != e_lane[b] || 32'(slot8[b]) != e_slot[b]) ok = 1'b0;
      check(ok, $sformatf("N=8 signature %b", 9'(s)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
