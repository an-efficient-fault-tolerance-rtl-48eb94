// tsv_ref_pkg: reference model shared by the link testbenches.
//
// ref_map() works out, from an error signature, which TSV lane and which
// time slot every data bit should use, written independently of the RTL:
// per group, the healthy lanes (data lanes in order, then the spare) are
// collected in a queue; bit i of the group goes on healthy lane i in slot 0,
// or, past the number of healthy lanes H, on healthy lane i-H in slot 1.
// Signature layout: data TSVs in bits 0..db-1, spare of group g in bit db+g.
package tsv_ref_pkg;
  typedef struct {
    int lane [128];
    int slot [128];
    bit two_slot;
    bit fail;
  } ref_map_t;

  function automatic ref_map_t ref_map(input logic [127:0] sig, input int db, input int gb);
    ref_map_t m;
    m.two_slot = 1'b0;
    m.fail = 1'b0;
    for (int g = 0; g < db / gb; g++) begin
      int hq[$];
      int h;
      for (int l = 0; l < gb; l++) if (!sig[g*gb + l]) hq.push_back(l);
      if (!sig[db + g]) hq.push_back(gb);
      h = hq.size();
      if (h < gb) m.two_slot = 1'b1;
      if (2 * h < gb) m.fail = 1'b1;
      for (int i = 0; i < gb; i++) begin
        if (i < h)          begin m.lane[g*gb + i] = hq[i];     m.slot[g*gb + i] = 0; end
        else if (i - h < h) begin m.lane[g*gb + i] = hq[i - h]; m.slot[g*gb + i] = 1; end
        else                begin m.lane[g*gb + i] = 0;         m.slot[g*gb + i] = 1; end
      end
    end
    return m;
  endfunction

  // Global TSV index of lane `lane` of group `g`.
  function automatic int tsv_index(input int g, input int lane, input int db, input int gb);
    return (lane == gb) ? db + g : g * gb + lane;
  endfunction
endpackage
