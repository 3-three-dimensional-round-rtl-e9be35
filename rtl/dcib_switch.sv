// Distributed common input buffer switch with a 3DRR scheduler.
// An N x N input-queued cell switch in which each group of K input ports
// shares one common input buffer holding N virtual output queues, so a group
// can send K cells per slot, even all from the same input port, as long as
// they go to different outputs. M = N/K buffers feed the N inputs of a
// space-division switch (buffer j drives inputs j*K .. j*K+K-1), and the
// centralized 3DRR scheduler configures that switch once per slot of
// P = max(K, M) cycles. The arrangement follows the document's switch
// figure; slot length, queue depth and the drop-on-full policy are this
// design's choices.
// Interface: `in_cell[i]` offers a cell at input i (one cell per port per
// slot is the line rate; more is accepted while queues have room);
// `out_cell[o]` carries a delivered cell for one cycle; `drop[i]` flags a
// cell lost to a full queue. Timing: without competition a cell reaches its
// output 2P + 4 to 3P + 3 cycles after it arrives (request snapshot, two
// pipelined projections, pop, switch register); it can leave sooner when it
// joins a shared queue that a grant in flight was made for.
module dcib_switch
  import tdrr_pkg::*;
#(
  parameter int unsigned N     = N_DEF,
  parameter int unsigned K     = K_DEF,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned M    = N / K
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cell_t [N-1:0]     in_cell,
  output logic  [N-1:0]     drop,
  output cell_t [N-1:0]     out_cell,
  output logic              slot_last,     // last cycle of a scheduling slot
  output logic              grant_valid,   // a new schedule takes effect
  output logic  [N-1:0]     grant_v,       // per switch input: it sends
  output idx_t  [N-1:0]     grant_o        // to this output
);
  logic [M-1:0][N-1:0] req;
  logic [M-1:0][K-1:0] g_v;
  idx_t [M-1:0][K-1:0] g_o;
  cell_t [N-1:0]       link;

  for (genvar j = 0; j < M; j++) begin : g_cib
    common_input_buffer #(.N(N), .K(K), .DEPTH(DEPTH)) u_cib (
      .clk, .rst_n,
      .in_cell    (in_cell[j*K +: K]),
      .drop       (drop[j*K +: K]),
      .req        (req[j]),
      .grant_valid(grant_valid),
      .grant_v    (g_v[j]),
      .grant_o    (g_o[j]),
      .out_cell   (link[j*K +: K])
    );
  end

  tdrr_scheduler #(.N(N), .K(K)) u_sched (
    .clk, .rst_n, .req_live(req), .grant_v(g_v), .grant_o(g_o),
    .grant_valid, .slot_last
  );

  assign grant_v = g_v;
  assign grant_o = g_o;

  space_division_switch #(.N(N)) u_sds (
    .clk, .rst_n, .cfg_load(grant_valid), .cfg_v(grant_v), .cfg_o(grant_o),
    .in_cell(link), .out_cell
  );
endmodule
