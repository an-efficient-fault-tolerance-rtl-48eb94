// bisr_tx: transmitting side of the TSV link (lower die).
//
// Test mode (`test_mode` high): every TSV, data and spare, is driven with one
// bit of the local LFSR test vector, and the LFSR advances once per cycle.
// Outside test mode the LFSR is held at its seed.
//
// Normal mode: the repair multiplexers put each data bit b on lane
// bit_lane[b] of its group during slot bit_slot[b]; lanes that carry nothing
// in the current slot are driven 0. When no group needs time division
// (`two_slot` low) a word goes across in one cycle. When some group does, the
// whole link takes two cycles per word: slot 0 then slot 1. The control
// block drives the three control TSVs: test mode, slot valid and slot number
// (see tsv_pkg).
//
// Handshake: `in_data` is offered with `in_valid` and taken on a cycle with
// `in_valid && in_ready`. `in_ready` is high when `enable` is high, the link
// is not in test mode, and the current slot is the word's last one. A word
// must stay on `in_data` with `in_valid` high until it is taken, since slot 0
// is sent from it before the word is accepted. Test mode abandons a word
// caught between its two slots; it is sent again from slot 0 afterwards. The TSV outputs are
// combinational from `in_data` and the slot register.
//
// The test-pattern multiplexers and the repair multiplexers in front of every
// TSV follow the original description. The original runs the TSVs at a
// higher clock so that two slots take no extra time; this design uses a single
// clock and halves the word rate instead, with a valid/ready handshake of its
// own choosing.
module bisr_tx #(
  parameter int unsigned  DATA_BITS  = 8,
  parameter int unsigned  GROUP_BITS = 4,
  localparam int unsigned GROUPS = DATA_BITS / GROUP_BITS,
  localparam int unsigned TSVS   = DATA_BITS + GROUPS,
  localparam int unsigned LANE_W = $clog2(GROUP_BITS + 1),
  parameter logic [TSVS-1:0] SEED = tsv_pkg::SEED_PATTERN[TSVS-1:0]
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             enable,
  input  logic                             test_mode,
  // repair selects from the repair register
  input  logic [DATA_BITS-1:0][LANE_W-1:0] bit_lane,
  input  logic [DATA_BITS-1:0]             bit_slot,
  input  logic                             two_slot,
  // data in
  input  logic                             in_valid,
  input  logic [DATA_BITS-1:0]             in_data,
  output logic                             in_ready,
  // TSVs, driven towards the upper die
  output logic [DATA_BITS-1:0]             tsv_data_tx,
  output logic [GROUPS-1:0]                tsv_spare_tx,
  output logic [tsv_pkg::NUM_CTRL_TSV-1:0] tsv_ctrl_tx
);
  import tsv_pkg::*;

  logic [TSVS-1:0] pattern;
  logic            slot_q;
  logic            send;   // a data slot goes out this cycle

  lfsr #(.WIDTH(TSVS), .SEED(SEED)) u_tpg_lfsr (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (!test_mode),
    .en    (test_mode),
    .state (pattern)
  );

  assign send     = enable && !test_mode && in_valid;
  assign in_ready = enable && !test_mode && (!two_slot || slot_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 slot_q <= 1'b0;
    else if (!two_slot || test_mode) slot_q <= 1'b0;
    else if (send)              slot_q <= !slot_q;
  end

  // Repair multiplexers: lane l of group g carries the bit whose select
  // points at it in the current slot.
  logic [GROUPS-1:0][GROUP_BITS:0] lanes;
  always_comb begin
    lanes = '0;
    for (int g = 0; g < GROUPS; g++) begin
      for (int i = 0; i < GROUP_BITS; i++) begin
        if (bit_slot[g*GROUP_BITS + i] == slot_q)
          lanes[g][bit_lane[g*GROUP_BITS + i]] = in_data[g*GROUP_BITS + i];
      end
    end
  end

  // Test-pattern multiplexers in front of the TSVs.
  always_comb begin
    for (int g = 0; g < GROUPS; g++) begin
      for (int i = 0; i < GROUP_BITS; i++)
        tsv_data_tx[g*GROUP_BITS + i] = test_mode ? pattern[g*GROUP_BITS + i]
                                                  : (send && lanes[g][i]);
      tsv_spare_tx[g] = test_mode ? pattern[DATA_BITS + g] : (send && lanes[g][GROUP_BITS]);
    end
  end

  always_comb begin
    tsv_ctrl_tx             = '0;
    tsv_ctrl_tx[CTRL_TEST]  = test_mode;
    tsv_ctrl_tx[CTRL_VALID] = send;
    tsv_ctrl_tx[CTRL_SLOT]  = slot_q && send;
  end

  // A word that was offered must stay offered, unchanged, until taken.
  property p_hold_word;
    @(posedge clk) disable iff (!rst_n)
      (in_valid && !in_ready) |=> (in_valid && $stable(in_data));
  endproperty
  a_hold_word: assert property (p_hold_word)
    else $error("bisr_tx: in_data changed or in_valid dropped before the word was taken");
endmodule
