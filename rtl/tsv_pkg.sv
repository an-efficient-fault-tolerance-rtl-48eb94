// tsv_pkg: shared constants, types and helper functions of the TSV self-test
// and self-repair link.
//
// The link carries DATA_BITS data bits over DATA_BITS data TSVs, split into
// groups of GROUP_BITS data TSVs that each own one spare TSV, plus three
// control TSVs from the transmitting die to the receiving die. Within a group
// the TSVs are numbered as "lanes": lanes 0..GROUP_BITS-1 are the data TSVs,
// lane GROUP_BITS is the spare.
//
// The three control TSVs (TSV 5, 6 and 7 of the four-bit group drawing) are
// used here as: test mode, word-slot valid, and slot number of the two-slot
// time-division transfer. That assignment is this design's choice; the
// original description only shows that the transmitter's control block drives
// three control TSVs to the receiver.
package tsv_pkg;

  localparam int unsigned NUM_CTRL_TSV = 3;
  localparam int unsigned CTRL_TEST    = 0;  // 1: self-test patterns on the TSVs
  localparam int unsigned CTRL_VALID   = 1;  // 1: a data slot is on the TSVs
  localparam int unsigned CTRL_SLOT    = 2;  // slot number (0 or 1) of that data slot

  // Repair class of one group, decoded from its error signature.
  typedef enum logic [1:0] {
    MODE_NORMAL = 2'd0,  // no faulty data TSV: bits go straight across
    MODE_SPARE  = 2'd1,  // one faulty data TSV: shift towards the spare
    MODE_TDMA   = 2'd2,  // more faults than spares: word sent in two slots
    MODE_FAIL   = 2'd3   // fewer than half the lanes healthy: cannot repair
  } repair_mode_e;

  // Self-test controller states.
  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,  // reset state, data allowed with the identity mapping
    ST_TEST = 2'd1,  // test vectors on the TSVs
    ST_LOAD = 2'd2,  // signature copied into the repair register
    ST_RUN  = 2'd3   // repaired normal operation
  } bist_state_e;

  // Default LFSR seed: alternating 0101... so that from the first two test
  // vectors on every TSV has carried both a 0 and a 1 and every pair of
  // neighbouring TSVs has carried different values, whatever the link width.
  localparam logic [255:0] SEED_PATTERN = {128{2'b01}};

  // Feedback taps of a maximal-length Fibonacci LFSR of the given width
  // (bit t-1 set for tap t; taps after Xilinx application note XAPP052).
  // Widths without an entry fall back to taps {w, w-1}, which still gives a
  // pseudo-random sequence that toggles every bit but is not guaranteed to be
  // of maximal length.
  function automatic logic [255:0] lfsr_taps(input int unsigned w);
    logic [255:0] t;
    t = '0;
    case (w)
      2:  begin t[1] = 1'b1; t[0] = 1'b1; end
      3:  begin t[2] = 1'b1; t[1] = 1'b1; end
      4:  begin t[3] = 1'b1; t[2] = 1'b1; end
      5:  begin t[4] = 1'b1; t[2] = 1'b1; end
      6:  begin t[5] = 1'b1; t[4] = 1'b1; end
      7:  begin t[6] = 1'b1; t[5] = 1'b1; end
      8:  begin t[7] = 1'b1; t[5] = 1'b1; t[4] = 1'b1; t[3] = 1'b1; end
      9:  begin t[8] = 1'b1; t[4] = 1'b1; end
      10: begin t[9] = 1'b1; t[6] = 1'b1; end
      11: begin t[10] = 1'b1; t[8] = 1'b1; end
      12: begin t[11] = 1'b1; t[5] = 1'b1; t[3] = 1'b1; t[0] = 1'b1; end
      13: begin t[12] = 1'b1; t[3] = 1'b1; t[2] = 1'b1; t[0] = 1'b1; end
      14: begin t[13] = 1'b1; t[4] = 1'b1; t[2] = 1'b1; t[0] = 1'b1; end
      15: begin t[14] = 1'b1; t[13] = 1'b1; end
      16: begin t[15] = 1'b1; t[14] = 1'b1; t[12] = 1'b1; t[3] = 1'b1; end
      17: begin t[16] = 1'b1; t[13] = 1'b1; end
      18: begin t[17] = 1'b1; t[10] = 1'b1; end
      20: begin t[19] = 1'b1; t[16] = 1'b1; end
      21: begin t[20] = 1'b1; t[18] = 1'b1; end
      22: begin t[21] = 1'b1; t[20] = 1'b1; end
      23: begin t[22] = 1'b1; t[17] = 1'b1; end
      25: begin t[24] = 1'b1; t[21] = 1'b1; end
      28: begin t[27] = 1'b1; t[24] = 1'b1; end
      29: begin t[28] = 1'b1; t[26] = 1'b1; end
      31: begin t[30] = 1'b1; t[27] = 1'b1; end
      32: begin t[31] = 1'b1; t[21] = 1'b1; t[1] = 1'b1; t[0] = 1'b1; end
      64: begin t[63] = 1'b1; t[62] = 1'b1; t[60] = 1'b1; t[59] = 1'b1; end
      default: begin
        if (w >= 2 && w <= 256) begin
          t[w-1] = 1'b1;
          t[w-2] = 1'b1;
        end
      end
    endcase
    return t;
  endfunction

endpackage
