// End-to-end testbench of dcib_switch at its default size: a 16 x 16 switch
// built from four common input buffers of four ports each, 3DRR scheduling
// with a slot of 4 cycles. Traffic phases: uniform random load, a saturating
// load on every input, an overload of one queue (to force drops), then a
// drain. Every cell carries its input port and a sequence number; the
// testbench checks that each cell leaves on its own output, exactly once, in
// order within its (input, output) flow, and that every accepted cell is
// delivered. It counts the mechanisms of the design and fails if one never
// happens: queue overflow drops, a buffer sending several cells in one slot,
// several cells of one slot coming from the same input port, two buffers
// competing for one output in the conditional selector, grants made after the
// first round-robin cycle through the feedback path, and slots in which all
// N outputs carry a cell. The schedule period of P cycles is checked too, and
// no cell may reach its output sooner than 4 cycles after it arrives. A last
// phase sends single cells into the empty switch in every cycle of a slot and
// checks their latency of 2P + 4 to 3P + 3 cycles.
module tb_dcib_switch;
  import tdrr_pkg::*;
  localparam int N = N_DEF, K = K_DEF, M = N / K, P = (K > M) ? K : M;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  cell_t [N-1:0] in_cell, out_cell;
  logic  [N-1:0] drop, grant_v;
  idx_t  [N-1:0] grant_o;
  logic          slot_last, grant_valid;
  dcib_switch dut (.clk, .rst_n, .in_cell, .drop, .out_cell, .slot_last, .grant_valid,
                   .grant_v, .grant_o);

  int unsigned flow [N][N][$];   // expected sequence numbers per (input, output)
  int sent = 0, accepted = 0, delivered = 0;
  int n_drop = 0, n_multi = 0, n_same_src = 0, n_conflict = 0, n_late = 0, n_full = 0;
  int last_gv = -1, cycle = 0;
  int arr_cycle [int];           // arrival cycle by sequence number
  int min_lat = 1 << 30;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Observers of the outputs and of internal scheduler events.
  always @(negedge clk) if (rst_n) begin
    int cnt;
    cnt = 0;
    for (int o = 0; o < N; o++)
      if (out_cell[o].valid) begin
        automatic int src;
        automatic int unsigned sq;
        src = int'(out_cell[o].payload[31:24]);
        sq  = out_cell[o].payload[23:0];
        cnt++;
        delivered++;
        checks++;
        if (int'(out_cell[o].dest) != o || src >= N || flow[src][o].size() == 0 ||
            flow[src][o][0] != sq) begin
          failures++;
          $display("FAIL output %0d got src %0d seq %0d dest %0d", o, src, sq, out_cell[o].dest);
        end else begin
          void'(flow[src][o].pop_front());
          if (arr_cycle.exists(sq)) begin
            if (cycle - arr_cycle[sq] < min_lat) min_lat = cycle - arr_cycle[sq];
            arr_cycle.delete(sq);
          end
        end
      end
    if (cnt == N) n_full++;
    // cells leaving the buffers this cycle: several per buffer, same source
    for (int j = 0; j < M; j++) begin
      int nb;
      nb = 0;
      for (int p = 0; p < K; p++)
        if (dut.link[j*K + p].valid) begin
          nb++;
          for (int q = p + 1; q < K; q++)
            if (dut.link[j*K + q].valid &&
                dut.link[j*K + q].payload[31:24] == dut.link[j*K + p].payload[31:24]) n_same_src++;
        end
      if (nb > 1) n_multi++;
    end
    // an output requested by two buffers in one round-robin cycle
    for (int o = 0; o < N; o++) begin
      int nreq;
      nreq = 0;
      for (int j = 0; j < M; j++) if (dut.u_sched.crr_req[o][j] != '0) nreq++;
      if (nreq > 1) n_conflict++;
    end
    if (dut.u_sched.cyc != '0 && dut.u_sched.gnt != '0) n_late++;
    if (grant_valid) begin
      checks++;
      if (last_gv >= 0 && cycle - last_gv != P) begin failures++; $display("FAIL schedule period"); end
      last_gv = cycle;
    end
    cycle++;
  end

  task automatic offer(input int i, input int o);
    in_cell[i].valid = 1'b1;
    in_cell[i].dest = idx_t'(o);
    in_cell[i].payload = {8'(i), 24'(sent)};
    arr_cycle[sent] = cycle;
    sent++;
  endtask

  // drives the inputs for one cycle and records what is accepted
  task automatic step();
    #1;
    for (int i = 0; i < N; i++)
      if (in_cell[i].valid) begin
        if (drop[i]) begin
          n_drop++;
          arr_cycle.delete(int'(in_cell[i].payload[23:0]));
        end
        else begin
          accepted++;
          flow[i][in_cell[i].dest].push_back(in_cell[i].payload[23:0]);
        end
      end
    @(posedge clk);
    @(negedge clk);
    in_cell = '0;
  endtask

  initial begin
    in_cell = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // phase 1: uniform random traffic, about 60 % load, one cell per port per slot
    for (int s = 0; s < 300; s++)
      for (int c = 0; c < P; c++) begin
        if (c == 0)
          for (int i = 0; i < N; i++) if ($urandom % 10 < 6) offer(i, $urandom % N);
        step();
      end
    // phase 2: saturation, every input sends to a random output every slot
    for (int s = 0; s < 300; s++)
      for (int c = 0; c < P; c++) begin
        if (c == 0) for (int i = 0; i < N; i++) offer(i, $urandom % N);
        step();
      end
    // phase 3: input 0 floods output 5 every cycle, four times the line rate
    for (int s = 0; s < 40; s++)
      for (int c = 0; c < P; c++) begin
        offer(0, 5);
        step();
      end
    // phase 4: drain
    for (int t = 0; t < 20000 && delivered < accepted; t++) step();
    repeat (4 * P) step();
    // phase 5: one cell into the empty switch in each cycle c of a slot
    for (int c = 0; c < P; c++) begin
      int t0, lat;
      while (!slot_last) step();
      step();                                 // now in cycle 0 of a slot
      repeat (c) step();
      t0 = cycle;
      lat = -1;
      offer(3, 9 + c);
      step();
      for (int w = 0; w < 8 * P && lat < 0; w++) begin
        if (out_cell[9 + c].valid) lat = cycle - t0;
        step();
      end
      $display("single cell in cycle %0d: latency %0d", c, lat);
      // sampled at the end of this slot (or the next one when it arrives in
      // the last cycle), two pipelined slots, pop, switch register
      checks++;
      if (lat != ((c < P - 1) ? (P - 1 - c) + 2 * P + 3 : 3 * P + 3)) begin
        failures++; $display("FAIL single-cell latency %0d in cycle %0d", lat, c);
      end
    end
    checks++;
    if (delivered != accepted) begin
      failures++; $display("FAIL delivered %0d of %0d accepted cells", delivered, accepted);
    end
    // the shortest path: written, seen live by the second projection in the
    // slot's last cycle, granted, popped onto the link, registered at the output
    checks++;
    if (min_lat < 4) begin failures++; $display("FAIL minimum latency %0d", min_lat); end
    checks++;
    if (n_drop == 0 || n_multi == 0 || n_same_src == 0 || n_conflict == 0 || n_late == 0 || n_full == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("sent=%0d accepted=%0d delivered=%0d drops=%0d multi_cell_slots=%0d same_source_pairs=%0d",
             sent, accepted, delivered, n_drop, n_multi, n_same_src);
    $display("minimum latency=%0d cycles", min_lat);
    $display("output_conflicts=%0d late_grants=%0d full_slots=%0d", n_conflict, n_late, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
