// Basic two-dimensional round-robin (2DRR) scheduler for one M x M atomic
// request matrix (rows: common input buffers j, columns: local outputs l).
// In each round-robin cycle one diagonal d is served: processor j looks at
// request (j, (j + d) mod M). The M requests of a diagonal never share a buffer
// or an output, so the M processors decide in parallel; a request is granted
// when neither its buffer nor its output has been granted earlier in the slot.
// Over M cycles every diagonal is visited once and the result is a matching.
// The diagonal sweep follows the document; the register layout is this
// design's own.
// Timing: combinational grants each cycle; the state accumulates on every
// edge and is cleared on the edge that ends the slot (`last`), where the
// `match_*_next` outputs give the slot's complete result.
module atomic_rr_scheduler
  import tdrr_pkg::*;
#(
  parameter int unsigned M = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   last,       // final cycle of the slot
  input  logic [M-1:0][M-1:0]    req,        // [buffer][local output]
  input  idx_t                   diag,       // diagonal served this cycle
  output logic [M-1:0]           match_v_next,  // buffer j matched
  output idx_t [M-1:0]           match_l_next   // its local output
);
  logic [M-1:0] buf_sel, out_sel, buf_sel_n, out_sel_n;
  idx_t [M-1:0] match_l;

  always_comb begin
    buf_sel_n    = buf_sel;
    out_sel_n    = out_sel;
    match_l_next = match_l;
    for (int j = 0; j < M; j++) begin
      automatic int unsigned l;
      l = (j + int'(diag)) % M;
      if (req[j][l] && !buf_sel[j] && !out_sel[l]) begin
        buf_sel_n[j]    = 1'b1;
        out_sel_n[l]    = 1'b1;
        match_l_next[j] = idx_t'(l);
      end
    end
    match_v_next = buf_sel_n;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_sel <= '0;
      out_sel <= '0;
      match_l <= '0;
    end else if (last) begin
      buf_sel <= '0;
      out_sel <= '0;
      match_l <= '0;
    end else begin
      buf_sel <= buf_sel_n;
      out_sel <= out_sel_n;
      match_l <= match_l_next;
    end
  end
endmodule
