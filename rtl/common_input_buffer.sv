// Common input buffer: K input ports of the switch share one buffer that
// keeps a separate virtual output queue (VOQ) for each of the N outputs, and
// the buffer owns K links into the space-division switch. Up to K cells can
// arrive in one cycle, even for the same queue; they are appended in port
// order. A cell whose queue is full is dropped and flagged on `drop`. When the
// scheduler's grant arrives (`grant_valid`), every granted link p pops the
// head of queue grant_o[p]; the scheduler never grants one queue twice in a
// slot, so the K pops hit different queues. The document specifies the K
// inputs, K outputs and N internal queues; the queue storage (one circular
// buffer of DEPTH cells per queue rather than a linked-list shared memory)
// and the drop policy are this design's choices.
// Interface: `req[n]` is high while queue n holds a cell that is not being
// popped this cycle. Timing: a popped cell appears on `out_cell[p]` for
// exactly one cycle, the cycle after `grant_valid`; an arriving cell is
// visible in `req` one cycle after it arrives.
module common_input_buffer
  import tdrr_pkg::*;
#(
  parameter int unsigned N     = N_DEF,
  parameter int unsigned K     = K_DEF,
  parameter int unsigned DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cell_t [K-1:0]     in_cell,
  output logic  [K-1:0]     drop,
  output logic  [N-1:0]     req,
  input  logic              grant_valid,
  input  logic  [K-1:0]     grant_v,
  input  idx_t  [K-1:0]     grant_o,
  output cell_t [K-1:0]     out_cell
);
  localparam int unsigned CW = $clog2(DEPTH + 1);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  cell_t                   mem [N][DEPTH];
  logic [N-1:0][AW-1:0]    head;
  logic [N-1:0][CW-1:0]    count;

  logic [N-1:0]            pop;
  logic [K-1:0]            wr_en;
  logic [K-1:0][AW-1:0]    wr_idx;
  logic [N-1:0][CW-1:0]    added;

  // Queues popped by this cycle's grant.
  always_comb begin
    pop = '0;
    if (grant_valid)
      for (int p = 0; p < K; p++)
        if (grant_v[p] && int'(grant_o[p]) < N && count[grant_o[p]] != '0)
          pop[grant_o[p]] = 1'b1;
  end

  for (genvar n = 0; n < N; n++) begin : g_req
    assign req[n] = (count[n] > CW'(pop[n]));
  end

  // Arrivals, appended in port order behind what the queue already holds.
  always_comb begin
    added  = '0;
    wr_en  = '0;
    wr_idx = '0;
    drop   = '0;
    for (int p = 0; p < K; p++) begin
      if (in_cell[p].valid && int'(in_cell[p].dest) < N) begin
        automatic int unsigned o;
        o = int'(in_cell[p].dest);
        if (int'(count[o]) + int'(added[o]) < DEPTH) begin
          wr_en[p]  = 1'b1;
          wr_idx[p] = AW'((int'(head[o]) + int'(count[o]) + int'(added[o])) % DEPTH);
          added[o]  = added[o] + 1'b1;
        end else begin
          drop[p] = 1'b1;
        end
      end else if (in_cell[p].valid) begin
        drop[p] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < K; p++)
      if (wr_en[p]) mem[in_cell[p].dest][wr_idx[p]] <= in_cell[p];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head     <= '0;
      count    <= '0;
      out_cell <= '0;
    end else begin
      for (int n = 0; n < N; n++) begin
        count[n] <= count[n] + added[n] - CW'(pop[n]);
        if (pop[n]) head[n] <= AW'((int'(head[n]) + 1) % DEPTH);
      end
      for (int p = 0; p < K; p++) begin
        if (grant_valid && grant_v[p] && int'(grant_o[p]) < N && pop[grant_o[p]])
          out_cell[p] <= mem[grant_o[p]][head[grant_o[p]]];
        else
          out_cell[p] <= '0;
      end
    end
  end

  // Two links of one buffer must never be granted the same queue.
  always_ff @(posedge clk) begin
    if (rst_n && grant_valid)
      for (int p = 0; p < K; p++)
        for (int q = p + 1; q < K; q++)
          assert (!(grant_v[p] && grant_v[q] && grant_o[p] == grant_o[q]))
            else $error("two links granted queue %0d", grant_o[p]);
  end
endmodule
