// First projection result screen.
// Copy i of the parallel round-robin processor found, for common buffer j and
// atomic matrix k, at most one output. The screen rotates copy i's results by
// i: the result of atomic matrix k goes to virtual output port (k + i) mod K
// of buffer j. Each of the K virtual output ports of a buffer therefore holds
// K candidates, one per copy, and the K candidates a copy places on one buffer
// always come from different atomic matrices, so they name different outputs.
// The rotation by i follows the document; holding the screen in registers is
// how this design pipelines the first and second projections.
// Timing: loads on the edge that ends a slot (`load`); the outputs are stable
// for the whole next slot.
module first_projection_screen
  import tdrr_pkg::*;
#(
  parameter int unsigned N = N_DEF,
  parameter int unsigned K = K_DEF,
  localparam int unsigned M = N / K
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              load,
  input  logic [K-1:0][K-1:0][M-1:0]        res_v,   // [copy][k][buffer]
  input  idx_t [K-1:0][K-1:0][M-1:0]        res_o,
  output logic [M-1:0][K-1:0][K-1:0]        scr_v,   // [buffer][port][copy]
  output idx_t [M-1:0][K-1:0][K-1:0]        scr_o
);
  logic [M-1:0][K-1:0][K-1:0] rot_v;
  idx_t [M-1:0][K-1:0][K-1:0] rot_o;

  always_comb begin
    for (int j = 0; j < M; j++)
      for (int p = 0; p < K; p++)
        for (int i = 0; i < K; i++) begin
          automatic int unsigned k;
          k = (p + K - i) % K;   // p = (k + i) mod K
          rot_v[j][p][i] = res_v[i][k][j];
          rot_o[j][p][i] = res_o[i][k][j];
        end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scr_v <= '0;
      scr_o <= '0;
    end else if (load) begin
      scr_v <= rot_v;
      scr_o <= rot_o;
    end
  end
endmodule
