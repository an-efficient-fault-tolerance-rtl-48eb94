// tsv_repair_top: one die-to-die TSV link with built-in self-test (BIST) and
// built-in self-repair (BISR).
//
// The lower die sends DATA_BITS bits per word over DATA_BITS data TSVs, in
// groups of GROUP_BITS, each group with one spare TSV, and three control
// TSVs. The TSVs themselves are outside this module: the lower die's drive
// values leave on tsv_*_tx and the upper die's received values come back on
// tsv_*_rx, so a board, a fault model or a real stack sits in between.
//
// Operation:
//  1. `bist_start` pulse: the controller puts the link in test mode for
//     TEST_VECTORS cycles. The lower die drives LFSR vectors on all data and
//     spare TSVs; the upper die XORs what it receives with its own copy of
//     the LFSR and accumulates the error signature.
//  2. One cycle later the repair register stores the signature and the
//     decoded repair selects of every group.
//  3. Normal mode: each group sends its bits straight across (no fault),
//     shifted onto the spare (one faulty data TSV), or in two time slots over
//     the healthy TSVs (more faults than spares). `error_sig`,
//     `multi_defect`, `repair_fail` and `group_mode` report the outcome.
// Data may also flow before any test, with the identity mapping; no word is
// taken while the self-test runs or the repair register loads.
//
// Interface timing: `in_valid`/`in_ready` handshake (see bisr_tx), one word
// per cycle, or one per two cycles while `multi_defect` is high; `out_valid`
// pulses one cycle after a word's last slot crossed the TSVs.
//
// The control TSVs are taken to be defect free; the original scheme tests
// and repairs only the data TSVs and their spares. In a stacked product the
// signature would travel from the upper die to the repair register on the
// lower die; here both sides read the same repair register.
module tsv_repair_top #(
  parameter int unsigned  DATA_BITS    = 8,
  parameter int unsigned  GROUP_BITS   = 4,
  parameter int unsigned  TEST_VECTORS = 32,
  localparam int unsigned GROUPS = DATA_BITS / GROUP_BITS,
  localparam int unsigned TSVS   = DATA_BITS + GROUPS,
  localparam int unsigned LANE_W = $clog2(GROUP_BITS + 1)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // control
  input  logic                             bist_start,
  input  logic                             enable,
  output logic                             test_busy,
  output logic                             test_done,
  output logic [TSVS-1:0]                  error_sig,
  output logic                             multi_defect,
  output logic                             repair_fail,
  output tsv_pkg::repair_mode_e            group_mode [GROUPS],
  // data in (lower die)
  input  logic                             in_valid,
  input  logic [DATA_BITS-1:0]             in_data,
  output logic                             in_ready,
  // data out (upper die)
  output logic                             out_valid,
  output logic [DATA_BITS-1:0]             out_data,
  // TSVs: driven by the lower die
  output logic [DATA_BITS-1:0]             tsv_data_tx,
  output logic [GROUPS-1:0]                tsv_spare_tx,
  output logic [tsv_pkg::NUM_CTRL_TSV-1:0] tsv_ctrl_tx,
  // TSVs: as received on the upper die
  input  logic [DATA_BITS-1:0]             tsv_data_rx,
  input  logic [GROUPS-1:0]                tsv_spare_rx,
  input  logic [tsv_pkg::NUM_CTRL_TSV-1:0] tsv_ctrl_rx
);
  import tsv_pkg::*;

  localparam logic [TSVS-1:0] SEED = SEED_PATTERN[TSVS-1:0];

  logic                             test_mode, load_repair;
  logic [TSVS-1:0]                  sig_live;
  logic [TSVS-1:0]                  unused_mismatch;
  logic [DATA_BITS-1:0][LANE_W-1:0] bit_lane;
  logic [DATA_BITS-1:0]             bit_slot;


  ibist_controller #(.TEST_VECTORS(TEST_VECTORS)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (bist_start),
    .test_mode   (test_mode),
    .load_repair (load_repair),
    .busy        (test_busy),
    .done        (test_done)
  );

  bisr_tx #(.DATA_BITS(DATA_BITS), .GROUP_BITS(GROUP_BITS), .SEED(SEED)) u_tx (
    .clk          (clk),
    .rst_n        (rst_n),
    .enable       (enable && !test_busy),
    .test_mode    (test_mode),
    .bit_lane     (bit_lane),
    .bit_slot     (bit_slot),
    .two_slot     (multi_defect),
    .in_valid     (in_valid),
    .in_data      (in_data),
    .in_ready     (in_ready),
    .tsv_data_tx  (tsv_data_tx),
    .tsv_spare_tx (tsv_spare_tx),
    .tsv_ctrl_tx  (tsv_ctrl_tx)
  );

  ibist_analyzer #(.TSVS(TSVS), .SEED(SEED)) u_analyzer (
    .clk       (clk),
    .rst_n     (rst_n),
    .test      (tsv_ctrl_rx[CTRL_TEST]),
    .tsv_rx    ({tsv_spare_rx, tsv_data_rx}),
    .mismatch  (unused_mismatch),
    .error_sig (sig_live)
  );

  repair_register #(.DATA_BITS(DATA_BITS), .GROUP_BITS(GROUP_BITS)) u_repair_reg (
    .clk         (clk),
    .rst_n       (rst_n),
    .load        (load_repair),
    .sig_in      (sig_live),
    .error_sig   (error_sig),
    .bit_lane    (bit_lane),
    .bit_slot    (bit_slot),
    .mode        (group_mode),
    .two_slot    (multi_defect),
    .repair_fail (repair_fail)
  );

  bisr_rx #(.DATA_BITS(DATA_BITS), .GROUP_BITS(GROUP_BITS)) u_rx (
    .clk          (clk),
    .rst_n        (rst_n),
    .bit_lane     (bit_lane),
    .bit_slot     (bit_slot),
    .two_slot     (multi_defect),
    .tsv_data_rx  (tsv_data_rx),
    .tsv_spare_rx (tsv_spare_rx),
    .tsv_ctrl_rx  (tsv_ctrl_rx),
    .out_valid    (out_valid),
    .out_data     (out_data)
  );
endmodule
