// repair_decoder: TSV mapping unit of one repair group.
//
// Input: the error signature of one group, N = GROUP_BITS data TSVs (lanes
// 0..N-1) and one spare TSV (lane N), 1 = defective. Output: for every data
// bit b of the group, the lane that carries it (`bit_lane[b]`) and the time
// slot it is sent in (`bit_slot[b]`, 0 or 1), plus the repair class.
//
// How it works: the healthy lanes are listed in order, data lanes 0..N-1
// first and the spare last, and the data bits are dealt out to them in order.
// With H healthy lanes, bits 0..H-1 go in slot 0 on healthy lanes 0..H-1 and
// bits H..N-1 go in slot 1 on healthy lanes 0..N-H-1.
//  - No faulty data TSV: every bit stays on its own TSV (MODE_NORMAL).
//  - One faulty data TSV f and a healthy spare: bits below f stay, bits from
//    f upwards move to their neighbouring TSV and the last one onto the spare
//    (shift-and-replace, MODE_SPARE). One slot per word.
//  - H < N: the word is cut into two bundles sent in two slots; in the second
//    slot every healthy lane is free again, so all of them act as spares
//    (MODE_TDMA). This needs 2*H >= N; otherwise MODE_FAIL is reported
//    (`unrepairable`), and the bits that do not fit keep lane 0, slot 1.
// Purely combinational.
//
// The three repair classes (spare for one fault, two-bundle time division for
// several) follow the original description; shifting towards the spare and
// the in-order dealing of bits to healthy lanes are this design's choices
// where the description only gives the four-bit example.
module repair_decoder #(
  parameter int unsigned GROUP_BITS = 4,
  localparam int unsigned LANE_W = $clog2(GROUP_BITS + 1)
) (
  input  logic [GROUP_BITS-1:0]             sig_data,   // 1 = data TSV defective
  input  logic                              sig_spare,  // 1 = spare TSV defective
  output logic [GROUP_BITS-1:0][LANE_W-1:0] bit_lane,
  output logic [GROUP_BITS-1:0]             bit_slot,
  output tsv_pkg::repair_mode_e             mode,
  output logic                              two_slot,
  output logic                              unrepairable,
  output logic [LANE_W-1:0]                 healthy     // number of healthy lanes
);
  import tsv_pkg::*;

  localparam int unsigned N = GROUP_BITS;

  logic [N:0]                  faulty;
  logic [N:0][LANE_W-1:0]      rank;     // healthy lanes below each lane
  logic [LANE_W-1:0]           h;

  assign faulty = {sig_spare, sig_data};

  always_comb begin
    h = '0;
    for (int l = 0; l <= N; l++) begin
      rank[l] = h;
      if (!faulty[l]) h = h + 1'b1;
    end
  end

  always_comb begin
    for (int b = 0; b < N; b++) begin
      bit_lane[b] = '0;
      bit_slot[b] = 1'b1;
      for (int l = 0; l <= N; l++) begin
        if (!faulty[l] && (32'(rank[l]) == b)) begin
          bit_lane[b] = LANE_W'(l);
          bit_slot[b] = 1'b0;
        end else if (!faulty[l] && (32'(rank[l]) + 32'(h) == b)) begin
          bit_lane[b] = LANE_W'(l);
          bit_slot[b] = 1'b1;
        end
      end
    end
  end

  assign healthy      = h;
  assign two_slot     = (32'(h) < N);
  assign unrepairable = (2 * 32'(h) < N);

  always_comb begin
    if (unrepairable)        mode = MODE_FAIL;
    else if (two_slot)       mode = MODE_TDMA;
    else if (|sig_data)      mode = MODE_SPARE;
    else                     mode = MODE_NORMAL;
  end

  initial assert (GROUP_BITS >= 2) else $error("repair_decoder: GROUP_BITS must be >= 2");
endmodule
