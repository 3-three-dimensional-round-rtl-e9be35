// Conditional round-robin selector: second step of the second projection.
// One instance serves one output of the space-division switch. Its requests
// are the (buffer j, port p) pairs whose highest priority selector picked this
// output in the current round-robin cycle. The same queue may be projected on
// several ports of one buffer, so the selector first keeps one port per
// buffer (round-robin order from `port_start`, the same sequence for every
// buffer) and then grants one buffer with an M-to-1 round-robin from
// `buf_start`. At most one pair is granted. The one-per-buffer rule and the
// M-to-1 round-robin follow the document; the priority sequences are this
// design's choice.
// Timing: purely combinational.
module conditional_rr_selector
  import tdrr_pkg::*;
#(
  parameter int unsigned M = 4,
  parameter int unsigned K = 4
) (
  input  logic [M-1:0][K-1:0] req,
  input  idx_t                port_start,
  input  idx_t                buf_start,
  output logic [M-1:0][K-1:0] gnt
);
  logic [M-1:0]          breq;
  logic [M-1:0][K-1:0]   bsel;

  always_comb begin
    bsel = '0;
    breq = '0;
    for (int j = 0; j < M; j++)
      for (int r = 0; r < K; r++) begin
        automatic int unsigned p;
        p = (int'(port_start) + r) % K;
        if (!breq[j] && req[j][p]) begin
          breq[j]    = 1'b1;
          bsel[j][p] = 1'b1;
        end
      end
  end

  always_comb begin
    automatic logic done;
    done = 1'b0;
    gnt = '0;
    for (int r = 0; r < M; r++) begin
      automatic int unsigned j;
      j = (int'(buf_start) + r) % M;
      if (!done && breq[j]) begin
        done   = 1'b1;
        gnt[j] = bsel[j];
      end
    end
  end
endmodule
