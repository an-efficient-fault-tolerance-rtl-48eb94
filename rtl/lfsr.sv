// lfsr: pseudo-random test pattern generator of the interconnect self-test.
//
// A Fibonacci LFSR of WIDTH bits, one bit per TSV under test. The feedback is
// the XOR of the tap bits given by tsv_pkg::lfsr_taps(WIDTH) and is shifted in
// at bit 0, the rest moving one place up. Every LFSR state is sent twice, as
// a true/complement pair: the first `en` cycle shows the state, the second
// its bitwise complement, and only then does the LFSR step. So any two
// consecutive test vectors drive every TSV once to 0 and once to 1, and
// every stuck-at defect shows up within two vectors whatever the width; the
// LFSR supplies the pseudo-random variety between neighbouring TSVs.
//
// `load` puts SEED into the register and returns to the true phase (it wins
// over `en`); `en` advances one vector. `state` is the current test vector.
// Two instances with the same SEED that see the same load/en sequence stay in
// lockstep, which is how the transmitting die and the receiving die agree on
// every test vector without sending it twice.
//
// The use of an LFSR as the pattern source follows the original description;
// the Fibonacci form, the taps, the seed and the true/complement pairs are
// this design's choices. WIDTH may be 2 to 256.
module lfsr #(
  parameter int unsigned      WIDTH = 10,
  parameter logic [WIDTH-1:0] SEED  = tsv_pkg::SEED_PATTERN[WIDTH-1:0]
) (
  input  logic             clk,
  input  logic             rst_n,  // asynchronous, active low: loads SEED
  input  logic             load,   // synchronous reload of SEED
  input  logic             en,     // advance one test vector
  output logic [WIDTH-1:0] state   // current test vector
);
  localparam logic [255:0]     TAPS_ALL = tsv_pkg::lfsr_taps(WIDTH);
  localparam logic [WIDTH-1:0] TAPS     = TAPS_ALL[WIDTH-1:0];

  logic [WIDTH-1:0] lfsr_q;
  logic             complement_q;  // 1: second vector of the pair
  logic             feedback;

  assign feedback = ^(lfsr_q & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr_q       <= SEED;
      complement_q <= 1'b0;
    end else if (load) begin
      lfsr_q       <= SEED;
      complement_q <= 1'b0;
    end else if (en) begin
      complement_q <= !complement_q;
      if (complement_q) lfsr_q <= {lfsr_q[WIDTH-2:0], feedback};
    end
  end

  assign state = complement_q ? ~lfsr_q : lfsr_q;

  initial assert (SEED != '0 && WIDTH >= 2 && WIDTH <= 256)
    else $error("lfsr: SEED must not be zero and WIDTH must be 2..256");
endmodule
