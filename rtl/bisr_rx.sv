// bisr_rx: receiving side of the TSV link (upper die).
//
// While the test-mode control TSV is high the received bits belong to the
// self-test analyzer and nothing is captured here. Otherwise, in every cycle
// in which the slot-valid control TSV is high, each data bit b whose slot
// bit_slot[b] equals the received slot number is taken from lane
// bit_lane[b] of its group (data TSV or, through the spare's demultiplexer,
// the spare TSV) and written into its one-entry FIFO. On the word's last slot
// (slot 0 when no group uses time division, slot 1 otherwise) the word is
// complete, and the next cycle `out_valid` is high for one cycle with the
// whole word on `out_data`. Latency: one cycle after the last slot on the
// TSVs. There is no backpressure: the receiver takes every word.
//
// Lane select per bit and a FIFO per output bit follow the original
// description; the FIFO depth of one word and the one-cycle output timing
// are this design's choices.
module bisr_rx #(
  parameter int unsigned  DATA_BITS  = 8,
  parameter int unsigned  GROUP_BITS = 4,
  localparam int unsigned GROUPS = DATA_BITS / GROUP_BITS,
  localparam int unsigned LANE_W = $clog2(GROUP_BITS + 1)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // repair selects from the repair register
  input  logic [DATA_BITS-1:0][LANE_W-1:0] bit_lane,
  input  logic [DATA_BITS-1:0]             bit_slot,
  input  logic                             two_slot,
  // TSVs, as received from the lower die
  input  logic [DATA_BITS-1:0]             tsv_data_rx,
  input  logic [GROUPS-1:0]                tsv_spare_rx,
  input  logic [tsv_pkg::NUM_CTRL_TSV-1:0] tsv_ctrl_rx,
  // data out
  output logic                             out_valid,
  output logic [DATA_BITS-1:0]             out_data
);
  import tsv_pkg::*;

  logic rx_valid, rx_slot, last_slot;
  assign rx_valid  = tsv_ctrl_rx[CTRL_VALID] && !tsv_ctrl_rx[CTRL_TEST];
  assign rx_slot   = tsv_ctrl_rx[CTRL_SLOT];
  assign last_slot = !two_slot || rx_slot;

  // Lanes of each group: data TSVs, then the spare.
  logic [GROUPS-1:0][GROUP_BITS:0] lanes;
  always_comb begin
    for (int g = 0; g < GROUPS; g++)
      lanes[g] = {tsv_spare_rx[g], tsv_data_rx[g*GROUP_BITS +: GROUP_BITS]};
  end

  logic [DATA_BITS-1:0] fifo_q;   // one-entry FIFO per output bit

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fifo_q    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= rx_valid && last_slot;
      for (int b = 0; b < DATA_BITS; b++) begin
        if (rx_valid && (bit_slot[b] == rx_slot))
          fifo_q[b] <= lanes[b / GROUP_BITS][bit_lane[b]];
      end
    end
  end

  assign out_data = fifo_q;
endmodule
