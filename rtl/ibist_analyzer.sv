// ibist_analyzer: response analyzer of the interconnect self-test, on the
// receiving die.
//
// While the test-mode control TSV (`test`) is high, every received TSV bit is
// routed to the analyzer (the receiving demultiplexers' test path) and XORed
// with the same bit of a local LFSR that runs in lockstep with the one on the
// transmitting die. A 1 marks a TSV whose received bit differs from the
// expected one. The signature register ORs these marks over all test
// vectors, so after the test bit i of `error_sig` is 1 exactly when TSV i
// delivered a wrong value at least once (1 = defective, 0 = defect free).
//
// Timing: the local LFSR holds SEED while `test` is low and advances once per
// cycle while it is high, so vector t of the test is compared in the t-th
// test cycle. The first test cycle overwrites the signature (which clears the
// previous test's result); later test cycles OR into it. The signature is
// held while `test` is low. TSV order: data TSVs in bits 0..DATA_BITS-1,
// then one spare TSV per group.
//
// XOR comparison, signature register and the 0/1 meaning follow the original
// description; the lockstep LFSR timing and the sticky OR are this design's.
module ibist_analyzer #(
  parameter int unsigned      TSVS = 10,
  parameter logic [TSVS-1:0]  SEED = tsv_pkg::SEED_PATTERN[TSVS-1:0]
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            test,       // test-mode control TSV, as received
  input  logic [TSVS-1:0] tsv_rx,     // received TSV bits
  output logic [TSVS-1:0] mismatch,   // this cycle's XOR result (valid when test)
  output logic [TSVS-1:0] error_sig   // accumulated error signature
);
  logic [TSVS-1:0] expected;
  logic            test_q;

  lfsr #(.WIDTH(TSVS), .SEED(SEED)) u_ref_lfsr (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (!test),
    .en    (test),
    .state (expected)
  );

  assign mismatch = test ? (tsv_rx ^ expected) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      test_q    <= 1'b0;
      error_sig <= '0;
    end else begin
      test_q <= test;
      if (test && !test_q) error_sig <= mismatch;
      else if (test)       error_sig <= error_sig | mismatch;
    end
  end
endmodule
