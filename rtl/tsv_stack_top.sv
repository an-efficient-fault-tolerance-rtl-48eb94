// tsv_stack_top: a stack of LAYERS dies joined by LAYERS-1 self-testing,
// self-repairing TSV links, all tested in parallel.
//
// Link k (k = 0 .. LAYERS-2) joins die k (below, sending) to die k+1 (above,
// receiving) and is one tsv_repair_top. A single `bist_start` pulse starts
// the self-test of every link in the same cycle, so the whole stack is
// tested in TEST_VECTORS + 1 cycles however many dies it has: each layer
// checks what arrives from the layer below while it drives its own vectors to
// the layer above. `test_done` rises when every link has loaded its repair
// register; `repair_fail` is high when any link has a group beyond repair.
// Each link keeps its own repair register, so each die-to-die interface is
// repaired independently.
//
// The data side of every link is brought out as arrays indexed by link: the
// logic of die k feeds `in_*[k]` and the logic of die k+1 reads `out_*[k]`.
// The TSVs of every link are brought out the same way (`tsv_*_tx[k]`,
// `tsv_*_rx[k]`). Timing per link is that of tsv_repair_top.
//
// Parallel test of all layers and a repair register per die-to-die interface
// follow the original description, as does the three-layer default (layers
// k-1, k and k+1 of its test architecture drawing). There, one LFSR per layer
// serves both the check of the link below and the vectors for the link above;
// here each link has its own pair of LFSRs, which produce the same sequence.
module tsv_stack_top #(
  parameter int unsigned  LAYERS       = 3,
  parameter int unsigned  DATA_BITS    = 8,
  parameter int unsigned  GROUP_BITS   = 4,
  parameter int unsigned  TEST_VECTORS = 32,
  localparam int unsigned LINKS  = LAYERS - 1,
  localparam int unsigned GROUPS = DATA_BITS / GROUP_BITS,
  localparam int unsigned TSVS   = DATA_BITS + GROUPS
) (
  input  logic                                        clk,
  input  logic                                        rst_n,
  // stack-wide control and status
  input  logic                                        bist_start,
  input  logic [LINKS-1:0]                            enable,
  output logic                                        test_busy,
  output logic                                        test_done,
  output logic                                        repair_fail,
  // per-link status
  output logic [LINKS-1:0][TSVS-1:0]                  error_sig,
  output logic [LINKS-1:0]                            multi_defect,
  output logic [LINKS-1:0]                            link_fail,
  output tsv_pkg::repair_mode_e                       group_mode [LINKS][GROUPS],
  // per-link data
  input  logic [LINKS-1:0]                            in_valid,
  input  logic [LINKS-1:0][DATA_BITS-1:0]             in_data,
  output logic [LINKS-1:0]                            in_ready,
  output logic [LINKS-1:0]                            out_valid,
  output logic [LINKS-1:0][DATA_BITS-1:0]             out_data,
  // per-link TSVs
  output logic [LINKS-1:0][DATA_BITS-1:0]             tsv_data_tx,
  output logic [LINKS-1:0][GROUPS-1:0]                tsv_spare_tx,
  output logic [LINKS-1:0][tsv_pkg::NUM_CTRL_TSV-1:0] tsv_ctrl_tx,
  input  logic [LINKS-1:0][DATA_BITS-1:0]             tsv_data_rx,
  input  logic [LINKS-1:0][GROUPS-1:0]                tsv_spare_rx,
  input  logic [LINKS-1:0][tsv_pkg::NUM_CTRL_TSV-1:0] tsv_ctrl_rx
);
  logic [LINKS-1:0] busy, done;

  for (genvar k = 0; k < LINKS; k++) begin : g_link
    tsv_repair_top #(
      .DATA_BITS    (DATA_BITS),
      .GROUP_BITS   (GROUP_BITS),
      .TEST_VECTORS (TEST_VECTORS)
    ) u_link (
      .clk          (clk),
      .rst_n        (rst_n),
      .bist_start   (bist_start),
      .enable       (enable[k]),
      .test_busy    (busy[k]),
      .test_done    (done[k]),
      .error_sig    (error_sig[k]),
      .multi_defect (multi_defect[k]),
      .repair_fail  (link_fail[k]),
      .group_mode   (group_mode[k]),
      .in_valid     (in_valid[k]),
      .in_data      (in_data[k]),
      .in_ready     (in_ready[k]),
      .out_valid    (out_valid[k]),
      .out_data     (out_data[k]),
      .tsv_data_tx  (tsv_data_tx[k]),
      .tsv_spare_tx (tsv_spare_tx[k]),
      .tsv_ctrl_tx  (tsv_ctrl_tx[k]),
      .tsv_data_rx  (tsv_data_rx[k]),
      .tsv_spare_rx (tsv_spare_rx[k]),
      .tsv_ctrl_rx  (tsv_ctrl_rx[k])
    );
  end

  assign test_busy   = |busy;
  assign test_done   = &done;
  assign repair_fail = |link_fail;

  initial assert (LAYERS >= 2) else $error("tsv_stack_top: LAYERS must be >= 2");
endmodule
