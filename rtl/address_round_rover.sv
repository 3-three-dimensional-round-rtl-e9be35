// Address round rover of the 3DRR scheduler.
// A scheduling slot lasts P = max(K, M) clock cycles, the number of
// round-robin cycles needed to sweep all M diagonals of an M x M atomic
// request matrix (K >= M: K cycles, K <= M: M cycles). The rover counts the
// round-robin cycle within the slot (modulo P) and keeps the slot's start
// addresses: a start diagonal (modulo M), advanced at the end of every slot,
// and a start copy (modulo K), advanced each time the start diagonal wraps.
// Together they step through all M*K combinations, so no request keeps the
// lowest priority. (Advancing both every slot would lock the diagonal that the
// second projection favours to one parity and starve half of the queues.)
// The modulo counters follow the document; the stepping rule is this
// design's choice.
// Timing: `last` is high in the final cycle of each slot; all stages hand over
// their results on the clock edge that ends that cycle.
module address_round_rover
  import tdrr_pkg::*;
#(
  parameter int unsigned M = 4,
  parameter int unsigned K = 4
) (
  input  logic clk,
  input  logic rst_n,
  output idx_t cyc,        // round-robin cycle within the slot, 0 .. P-1
  output logic last,       // final cycle of the slot
  output idx_t diag_base,  // start diagonal of this slot, 0 .. M-1
  output idx_t copy_base   // start copy of this slot, 0 .. K-1
);
  localparam int unsigned P = (K > M) ? K : M;

  assign last = (cyc == idx_t'(P - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc       <= '0;
      diag_base <= '0;
      copy_base <= '0;
    end else if (last) begin
      cyc       <= '0;
      diag_base <= (diag_base == idx_t'(M - 1)) ? '0 : diag_base + 1'b1;
      if (diag_base == idx_t'(M - 1))
        copy_base <= (copy_base == idx_t'(K - 1)) ? '0 : copy_base + 1'b1;
    end else begin
      cyc <= cyc + 1'b1;
    end
  end
endmodule
