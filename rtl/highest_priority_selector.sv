// Highest priority selector: first step of the second projection.
// One instance serves one physical output port of one common input buffer.
// Its K candidates are the outputs projected onto that port by the K copies
// of the first projection. In each round-robin cycle it picks, in round-robin
// order starting at copy `start`, the first candidate that is still usable:
// the port has no grant yet, the output has not been granted to anyone in an
// earlier cycle of this slot (fed back from the second projection result),
// and the buffer's queue for that output still holds a cell. The exclusion of
// earlier selections follows the document; the document also mentions a
// "maximum cost" without defining it, so priority here is the round-robin
// order alone.
// Timing: purely combinational.
module highest_priority_selector
  import tdrr_pkg::*;
#(
  parameter int unsigned N = N_DEF,
  parameter int unsigned K = K_DEF
) (
  input  logic [K-1:0]   cand_v,     // candidate from copy i present
  input  idx_t [K-1:0]   cand_o,     // its output
  input  logic [N-1:0]   out_taken,  // outputs granted earlier in the slot
  input  logic [N-1:0]   req_live,   // this buffer's non-empty queues, now
  input  logic           filled,     // this port already has a grant
  input  idx_t           start,      // highest-priority copy this cycle
  output logic           sel_v,
  output idx_t           sel_o
);
  always_comb begin
    sel_v = 1'b0;
    sel_o = '0;
    if (!filled) begin
      for (int r = 0; r < K; r++) begin
        automatic int unsigned i;
        i = (int'(start) + r) % K;
        if (!sel_v && cand_v[i] && int'(cand_o[i]) < N
            && !out_taken[cand_o[i]] && req_live[cand_o[i]]) begin
          sel_v = 1'b1;
          sel_o = cand_o[i];
        end
      end
    end
  end
endmodule
