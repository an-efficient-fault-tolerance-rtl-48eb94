// tsv_fault_model: behavioural model of the TSV bundle between two dies,
// with injectable manufacturing defects (testbench use only).
//
// Each data and spare TSV passes its bit from the lower die to the upper die
// unless a fault is set on it:
//  - stuck0[i] / stuck1[i]: TSV i always delivers 0 / 1 (an open or a short
//    to a supply rail);
//  - bridge[i]: TSV i and TSV i+1 are shorted together and both deliver the
//    AND of the two driven values (a wired-AND short between neighbours).
// stuck0 wins over stuck1, and both over a bridge. The control TSVs are
// passed through unchanged. TSV index: data TSVs first, then the spares.
module tsv_fault_model #(
  parameter int unsigned DATA_BITS = 8,
  parameter int unsigned GROUPS    = 2,
  localparam int unsigned TSVS     = DATA_BITS + GROUPS
) (
  input  logic [DATA_BITS-1:0] tsv_data_tx,
  input  logic [GROUPS-1:0]    tsv_spare_tx,
  input  logic [2:0]           tsv_ctrl_tx,
  input  logic [TSVS-1:0]      stuck0,
  input  logic [TSVS-1:0]      stuck1,
  input  logic [TSVS-1:0]      bridge,
  output logic [DATA_BITS-1:0] tsv_data_rx,
  output logic [GROUPS-1:0]    tsv_spare_rx,
  output logic [2:0]           tsv_ctrl_rx
);
  logic [TSVS-1:0] driven, bridged;

  assign driven = {tsv_spare_tx, tsv_data_tx};

  always_comb begin
    bridged = driven;
    for (int i = 0; i + 1 < TSVS; i++) begin
      if (bridge[i]) begin
        bridged[i]     = driven[i] & driven[i+1];
        bridged[i + 1] = driven[i] & driven[i+1];
      end
    end
  end

  assign {tsv_spare_rx, tsv_data_rx} = (bridged | stuck1) & ~stuck0;
  assign tsv_ctrl_rx = tsv_ctrl_tx;
endmodule
