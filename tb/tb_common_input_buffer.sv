// Self-checking testbench of common_input_buffer (N = 16, K = 4, queues cut
// to DEPTH = 4 so that they fill). Random bursts arrive on the K inputs, often
// several for one queue in the same cycle; every fourth cycle a random set of
// distinct non-empty queues is granted to random links. The testbench keeps
// one SystemVerilog queue per output and checks the request vector, the drop
// flags and every cell that leaves, including its one-cycle timing.
module tb_common_input_buffer;
  import tdrr_pkg::*;
  localparam int N = 16, K = 4, D = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  cell_t [K-1:0] in_cell, out_cell;
  logic  [K-1:0] drop, gv;
  logic  [N-1:0] req;
  idx_t  [K-1:0] go;
  logic          grant_valid;
  common_input_buffer #(.N(N), .K(K), .DEPTH(D)) dut (.clk, .rst_n, .in_cell, .drop, .req,
      .grant_valid, .grant_v(gv), .grant_o(go), .out_cell);

  cell_t q [N][$];
  cell_t exp_out [K];
  int drops = 0, pops = 0, same_q = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seq;
    seq = 0;
    in_cell = '0; gv = '0; go = '0; grant_valid = 0;
    for (int p = 0; p < K; p++) exp_out[p] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      bit used [N];
      int hot;
      // outputs of the previous cycle's pops
      for (int p = 0; p < K; p++) begin
        checks++;
        if (out_cell[p] !== exp_out[p]) begin failures++; $display("FAIL out t=%0d p=%0d", t, p); end
        exp_out[p] = '0;
      end
      // grants
      grant_valid = (t % 4 == 0);
      gv = '0; go = '0;
      for (int o = 0; o < N; o++) used[o] = 0;
      if (grant_valid)
        for (int p = 0; p < K; p++) begin
          automatic int o;
          o = $urandom % N;
          if (q[o].size() > 0 && !used[o] && ($urandom % 4 != 0)) begin
            used[o] = 1; gv[p] = 1; go[p] = idx_t'(o);
          end
        end
      // arrivals
      hot = $urandom % N;
      for (int p = 0; p < K; p++) begin
        in_cell[p] = '0;
        if ($urandom % 2) begin
          in_cell[p].valid = 1;
          in_cell[p].dest = idx_t'(($urandom % 2) ? hot : $urandom % N);
          in_cell[p].payload = PAYLOAD_W'(seq++);
        end
      end
      #1;
      for (int o = 0; o < N; o++) begin
        checks++;
        if (req[o] != (q[o].size() > (used[o] ? 1 : 0))) begin failures++; $display("FAIL req t=%0d o=%0d", t, o); end
      end
      // model update: pops first, then arrivals in port order
      for (int p = 0; p < K; p++)
        if (gv[p]) begin exp_out[p] = q[go[p]].pop_front(); pops++; end
      begin
        int cnt [N];
        for (int o = 0; o < N; o++) cnt[o] = q[o].size() + (used[o] ? 1 : 0);
        for (int p = 0; p < K; p++)
          if (in_cell[p].valid) begin
            automatic bit ed;
            ed = (cnt[in_cell[p].dest] >= D);
            checks++;
            if (drop[p] != ed) begin failures++; $display("FAIL drop t=%0d p=%0d", t, p); end
            if (ed) drops++;
            else begin
              q[in_cell[p].dest].push_back(in_cell[p]);
              cnt[in_cell[p].dest]++;
            end
          end
        for (int p = 1; p < K; p++)
          if (in_cell[p].valid && in_cell[p-1].valid && in_cell[p].dest == in_cell[p-1].dest) same_q++;
      end
      @(negedge clk);
    end
    checks++;
    if (drops == 0 || pops == 0 || same_q == 0) begin failures++; $display("FAIL mechanism missing"); end
    $display("drops=%0d pops=%0d same_queue_arrivals=%0d", drops, pops, same_q);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
