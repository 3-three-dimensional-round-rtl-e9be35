// Second projection result.
// Collects, over the round-robin cycles of a slot, which output every
// physical port of every common input buffer has been granted. The ports
// already filled and the outputs already taken are fed back to the highest
// priority selectors, so later cycles only fill what is still free. On the
// edge that ends the slot the complete schedule is copied to the grant
// registers, which hold it for the next slot, and the collection restarts
// empty. The feedback path follows the document's architecture figure; the
// register organisation is this design's own.
// Timing: `grant_valid` is high for the one cycle after the hand-over edge;
// `grant_v`/`grant_o` stay unchanged until the next hand-over.
module second_projection_result
  import tdrr_pkg::*;
#(
  parameter int unsigned N = N_DEF,
  parameter int unsigned K = K_DEF,
  localparam int unsigned M = N / K
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    last,
  input  logic [M-1:0][K-1:0]     gnt,        // port granted this cycle
  input  idx_t [M-1:0][K-1:0]     gnt_o,      // to this output
  output logic [M-1:0][K-1:0]     filled,     // feedback: port has a grant
  output logic [N-1:0]            out_taken,  // feedback: output is granted
  output logic [M-1:0][K-1:0]     grant_v,    // schedule of the previous slot
  output idx_t [M-1:0][K-1:0]     grant_o,
  output logic                    grant_valid
);
  idx_t [M-1:0][K-1:0] port_o, port_o_n;
  logic [M-1:0][K-1:0] filled_n;
  logic [N-1:0]        taken_n;

  always_comb begin
    filled_n = filled;
    port_o_n = port_o;
    taken_n  = out_taken;
    for (int j = 0; j < M; j++)
      for (int p = 0; p < K; p++)
        if (gnt[j][p] && int'(gnt_o[j][p]) < N) begin
          filled_n[j][p]      = 1'b1;
          port_o_n[j][p]      = gnt_o[j][p];
          taken_n[gnt_o[j][p]] = 1'b1;
        end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      filled      <= '0;
      port_o      <= '0;
      out_taken   <= '0;
      grant_v     <= '0;
      grant_o     <= '0;
      grant_valid <= 1'b0;
    end else if (last) begin
      grant_v     <= filled_n;
      grant_o     <= port_o_n;
      grant_valid <= 1'b1;
      filled      <= '0;
      port_o      <= '0;
      out_taken   <= '0;
    end else begin
      filled      <= filled_n;
      port_o      <= port_o_n;
      out_taken   <= taken_n;
      grant_valid <= 1'b0;
    end
  end
endmodule
