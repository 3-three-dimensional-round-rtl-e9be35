// Three-dimensional round-robin (3DRR) centralized scheduler.
// Every slot it chooses, for the M common input buffers of an N x N switch
// (K ports each, M = N/K), up to M*K = N (buffer, port, output) triples such
// that every output and every buffer port is used at most once and every
// granted queue holds a cell. It is built from the blocks of the document's
// architecture: the address round rover, the request matrix, the parallel
// round-robin processor (K copies x K atomic matrices x M processors), the
// first projection screen, then M*K highest priority selectors, N conditional
// round-robin selectors and the second projection result with its feedback.
// The two projections work as a two-stage pipeline, each taking one slot of
// P = max(K, M) cycles, so a new schedule of M*K grants comes out every P
// cycles, as the document states. Pipelining the two projections, and the
// rule that the second projection also checks the live queue state (the
// request matrix snapshot can be one schedule old), are this design's choices.
// Interface: `req_live[j][n]` is high while buffer j's queue for output n
// holds a cell that is not being sent. Timing: requests sampled on the edge
// ending slot s are granted by the schedule that appears with `grant_valid`
// two slots (2P cycles) later; `grant_v[j][p]`/`grant_o[j][p]` say that port
// p of buffer j sends its queue for output grant_o.
module tdrr_scheduler
  import tdrr_pkg::*;
#(
  parameter int unsigned N = N_DEF,
  parameter int unsigned K = K_DEF,
  localparam int unsigned M = N / K
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [M-1:0][N-1:0]     req_live,
  output logic [M-1:0][K-1:0]     grant_v,
  output idx_t [M-1:0][K-1:0]     grant_o,
  output logic                    grant_valid,
  output logic                    slot_last    // last cycle of a slot
);
  idx_t cyc, diag_base, copy_base;
  logic last;

  address_round_rover #(.M(M), .K(K)) u_rover (
    .clk, .rst_n, .cyc, .last, .diag_base, .copy_base
  );
  assign slot_last = last;

  // ---- first projection ----
  logic [M-1:0][N-1:0]        req_snap;
  logic [K-1:0][M-1:0][M-1:0] atomic;

  request_matrix #(.N(N), .K(K)) u_req (
    .clk, .rst_n, .load(last), .req_in(req_live), .req(req_snap), .atomic
  );

  logic [K-1:0][K-1:0][M-1:0] res_v;
  idx_t [K-1:0][K-1:0][M-1:0] res_o;

  parallel_rr_processor #(.N(N), .K(K)) u_prrp (
    .clk, .rst_n, .last, .atomic, .diag_base, .cyc,
    .res_v_next(res_v), .res_o_next(res_o)
  );

  logic [M-1:0][K-1:0][K-1:0] scr_v;
  idx_t [M-1:0][K-1:0][K-1:0] scr_o;

  first_projection_screen #(.N(N), .K(K)) u_screen (
    .clk, .rst_n, .load(last), .res_v, .res_o, .scr_v, .scr_o
  );

  // ---- second projection ----
  logic [M-1:0][K-1:0] filled, hps_v, gnt;
  idx_t [M-1:0][K-1:0] hps_o;
  logic [N-1:0]        out_taken;
  idx_t                copy_start, port_start, buf_start;

  assign copy_start = rr_mod(int'(copy_base), int'(cyc), K);
  assign port_start = rr_mod(0, int'(cyc), K);
  assign buf_start  = rr_mod(int'(diag_base), int'(cyc), M);

  for (genvar j = 0; j < M; j++) begin : g_buf
    for (genvar p = 0; p < K; p++) begin : g_port
      highest_priority_selector #(.N(N), .K(K)) u_hps (
        .cand_v   (scr_v[j][p]),
        .cand_o   (scr_o[j][p]),
        .out_taken(out_taken),
        .req_live (req_live[j]),
        .filled   (filled[j][p]),
        .start    (copy_start),
        .sel_v    (hps_v[j][p]),
        .sel_o    (hps_o[j][p])
      );
    end
  end

  logic [N-1:0][M-1:0][K-1:0] crr_req, crr_gnt;

  for (genvar o = 0; o < N; o++) begin : g_out
    always_comb begin
      for (int j = 0; j < M; j++)
        for (int p = 0; p < K; p++)
          crr_req[o][j][p] = hps_v[j][p] && (hps_o[j][p] == idx_t'(o));
    end
    conditional_rr_selector #(.M(M), .K(K)) u_crr (
      .req(crr_req[o]), .port_start, .buf_start, .gnt(crr_gnt[o])
    );
  end

  always_comb begin
    gnt = '0;
    for (int o = 0; o < N; o++) gnt |= crr_gnt[o];
  end

  second_projection_result #(.N(N), .K(K)) u_spr (
    .clk, .rst_n, .last, .gnt, .gnt_o(hps_o),
    .filled, .out_taken, .grant_v, .grant_o, .grant_valid
  );
endmodule
