// Request matrix of the 3DRR scheduler.
// Column j holds the requests of common input buffer j: bit [j][n] is set when
// the buffer's virtual output queue for output n holds a cell. The matrix is
// a snapshot taken on the edge that ends a slot (`load`), so the first
// projection works on stable requests for a whole slot. The K atomic M x M
// matrices the document cuts it into are fan-outs of the same bits:
// atomic[k][j][l] is request [j][k*M + l] (rows k*M .. k*M+M-1 of column j).
// Timing: the outputs change one cycle after `load`.
module request_matrix
  import tdrr_pkg::*;
#(
  parameter int unsigned N = N_DEF,
  parameter int unsigned K = K_DEF,
  localparam int unsigned M = N / K
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              load,
  input  logic [M-1:0][N-1:0]               req_in,  // live VOQ requests
  output logic [M-1:0][N-1:0]               req,     // snapshot
  output logic [K-1:0][M-1:0][M-1:0]        atomic   // [atomic][buffer][local output]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    req <= '0;
    else if (load) req <= req_in;
  end

  always_comb begin
    for (int k = 0; k < K; k++)
      for (int j = 0; j < M; j++)
        for (int l = 0; l < M; l++)
          atomic[k][j][l] = req[j][k*M + l];
  end
endmodule
