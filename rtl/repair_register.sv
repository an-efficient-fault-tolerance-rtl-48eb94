// repair_register: holds the repair information of the whole link.
//
// On `load` (one cycle, from the self-test controller at the end of the
// test) it stores the error signature `sig_in` and, decoded from it by one
// repair_decoder per group, the MUX selects every data bit needs: the lane
// inside its group (`bit_lane`) and its time slot (`bit_slot`), the group's
// repair mode, and link-wide flags. Both the transmitting and the receiving
// side are steered by these registered selects. Out of reset the register
// holds an all-zero signature, i.e. the identity mapping (every bit on its
// own TSV, one slot).
//
// Signature layout: bits 0..DATA_BITS-1 are the data TSVs, bit DATA_BITS+g
// is the spare TSV of group g.
//
// That one register keeps the error signature and the MUX selects follows
// the original description; decoding once at load time and storing the
// decoded selects (rather than decoding continuously) is this design's
// choice.
module repair_register #(
  parameter int unsigned  DATA_BITS  = 8,
  parameter int unsigned  GROUP_BITS = 4,
  localparam int unsigned GROUPS = DATA_BITS / GROUP_BITS,
  localparam int unsigned TSVS   = DATA_BITS + GROUPS,
  localparam int unsigned LANE_W = $clog2(GROUP_BITS + 1)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             load,
  input  logic [TSVS-1:0]                  sig_in,
  output logic [TSVS-1:0]                  error_sig,
  output logic [DATA_BITS-1:0][LANE_W-1:0] bit_lane,
  output logic [DATA_BITS-1:0]             bit_slot,
  output tsv_pkg::repair_mode_e            mode [GROUPS],
  output logic                             two_slot,      // some group uses TDMA
  output logic                             repair_fail    // some group cannot be repaired
);
  import tsv_pkg::*;

  logic [DATA_BITS-1:0][LANE_W-1:0] dec_lane;
  logic [DATA_BITS-1:0]             dec_slot;
  repair_mode_e                     dec_mode [GROUPS];
  logic [GROUPS-1:0]                dec_two, dec_fail;

  for (genvar g = 0; g < GROUPS; g++) begin : g_dec
    logic [LANE_W-1:0] unused_healthy;
    repair_decoder #(.GROUP_BITS(GROUP_BITS)) u_dec (
      .sig_data     (sig_in[g*GROUP_BITS +: GROUP_BITS]),
      .sig_spare    (sig_in[DATA_BITS + g]),
      .bit_lane     (dec_lane[g*GROUP_BITS +: GROUP_BITS]),
      .bit_slot     (dec_slot[g*GROUP_BITS +: GROUP_BITS]),
      .mode         (dec_mode[g]),
      .two_slot     (dec_two[g]),
      .unrepairable (dec_fail[g]),
      .healthy      (unused_healthy)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      error_sig   <= '0;
      for (int b = 0; b < DATA_BITS; b++) bit_lane[b] <= LANE_W'(b % GROUP_BITS);
      bit_slot    <= '0;
      for (int g = 0; g < GROUPS; g++) mode[g] <= MODE_NORMAL;
      two_slot    <= 1'b0;
      repair_fail <= 1'b0;
    end else if (load) begin
      error_sig   <= sig_in;
      bit_lane    <= dec_lane;
      bit_slot    <= dec_slot;
      for (int g = 0; g < GROUPS; g++) mode[g] <= dec_mode[g];
      two_slot    <= |dec_two;
      repair_fail <= |dec_fail;
    end
  end

  initial assert (DATA_BITS % GROUP_BITS == 0)
    else $error("repair_register: DATA_BITS must be a multiple of GROUP_BITS");
endmodule
