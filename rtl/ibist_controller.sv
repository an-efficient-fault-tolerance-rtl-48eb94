// ibist_controller: sequencer of the interconnect built-in self-test.
//
// A pulse on `start` (accepted in any state but ST_TEST) puts the link in
// test mode for exactly TEST_VECTORS clock cycles, one test vector per cycle
// on every TSV. After the last vector the controller spends one cycle in
// ST_LOAD, in which `load_repair` copies the accumulated error signature and
// the decoded repair selects into the repair register, and then stays in
// ST_RUN, the repaired normal mode, until the next `start`. Out of reset it
// is in ST_IDLE, where the link runs with the identity mapping.
//
// Outputs: `test_mode` is high during ST_TEST (it drives the test-pattern
// multiplexers and the test-mode control TSV), `load_repair` during ST_LOAD,
// `busy` during ST_TEST and ST_LOAD, `done` during ST_RUN.
//
// That a controller runs the test and hands the signature to the repair logic
// follows the original description (test loop of the algorithm, then repair);
// the state encoding, the one-vector-per-cycle rate and the default of 32
// vectors are this design's choices.
module ibist_controller #(
  parameter int unsigned TEST_VECTORS = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic test_mode,
  output logic load_repair,
  output logic busy,
  output logic done
);
  import tsv_pkg::*;

  localparam int unsigned CW = $clog2(TEST_VECTORS + 1);

  bist_state_e      state;
  logic [CW-1:0]    count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      count <= '0;
    end else begin
      unique case (state)
        ST_IDLE, ST_RUN, ST_LOAD: begin
          if (start) begin
            state <= ST_TEST;
            count <= CW'(TEST_VECTORS - 1);
          end else if (state == ST_LOAD) begin
            state <= ST_RUN;
          end
        end
        ST_TEST: begin
          if (count == '0) state <= ST_LOAD;
          else             count <= count - 1'b1;
        end
      endcase
    end
  end

  assign test_mode   = (state == ST_TEST);
  assign load_repair = (state == ST_LOAD);
  assign busy        = (state == ST_TEST) || (state == ST_LOAD);
  assign done        = (state == ST_RUN);

  initial assert (TEST_VECTORS >= 1) else $error("ibist_controller: TEST_VECTORS must be >= 1");
endmodule
