// Parallel round-robin processor: the first projection of the 3DRR scheduler.
// It holds K copies of the "M x N parallel round-robin scheduler". Each copy
// runs K atomic 2DRR schedulers side by side, one per M x M atomic request
// matrix (atomic matrix k covers outputs k*M .. k*M+M-1), so a copy is made of
// K*M processors and the whole unit of K*K*M. All copies start at the same
// slot boundary but in a different phase: copy i serves diagonal
// (diag_base + i + cyc) mod M in round-robin cycle cyc. Copy i thus finds,
// for every common buffer j and every atomic matrix k, at most one output;
// the copies differ in which output they find. The structure (K copies, K
// atomic matrices, M diagonal processors, different start phases) follows the
// document; the phase offset of exactly i diagonals is this design's reading.
// Timing: results are combinational `*_next` values that are complete on the
// last cycle of a slot and captured by the first projection screen.
module parallel_rr_processor
  import tdrr_pkg::*;
#(
  parameter int unsigned N = N_DEF,
  parameter int unsigned K = K_DEF,
  localparam int unsigned M = N / K
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               last,
  input  logic [K-1:0][M-1:0][M-1:0]         atomic,     // [k][buffer][local out]
  input  idx_t                               diag_base,
  input  idx_t                               cyc,
  output logic [K-1:0][K-1:0][M-1:0]         res_v_next, // [copy][k][buffer]
  output idx_t [K-1:0][K-1:0][M-1:0]         res_o_next  // global output index
);
  for (genvar i = 0; i < K; i++) begin : g_copy
    idx_t diag;
    assign diag = rr_mod(int'(diag_base) + i, int'(cyc), M);
    for (genvar k = 0; k < K; k++) begin : g_atomic
      idx_t [M-1:0] l_next;
      atomic_rr_scheduler #(.M(M)) u_atomic (
        .clk          (clk),
        .rst_n        (rst_n),
        .last         (last),
        .req          (atomic[k]),
        .diag         (diag),
        .match_v_next (res_v_next[i][k]),
        .match_l_next (l_next)
      );
      for (genvar j = 0; j < M; j++) begin : g_buf
        assign res_o_next[i][k][j] = idx_t'(k * M) + l_next[j];
      end
    end
  end
endmodule
