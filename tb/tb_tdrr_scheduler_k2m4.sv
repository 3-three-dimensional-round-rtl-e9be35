// Self-checking testbench of tdrr_scheduler in an uneven configuration,
// N = 8, K = 2, so M = 4 and K < M, slot P = max(K, M) = 4 cycles. The checks are those of
// tb_tdrr_scheduler: every schedule against an independent model of the 3DRR
// algorithm, conflict-freedom, grants only to non-empty queues, the P-cycle
// period, N grants for a full request matrix, and at least min(K, M) grants
// for a single buffer whose requests are concentrated on four outputs.
module tb_tdrr_scheduler_k2m4;
  import tdrr_pkg::*;
  localparam int N = 8, K = 2, M = N / K, P = (K > M) ? K : M, SLOTS = 400;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [M-1:0][N-1:0] req_live;
  logic [M-1:0][K-1:0] gv;
  idx_t [M-1:0][K-1:0] go;
  logic grant_valid, slot_last;
  tdrr_scheduler #(.N(N), .K(K)) dut (.clk, .rst_n, .req_live, .grant_v(gv), .grant_o(go), .grant_valid, .slot_last);

  logic [M-1:0][N-1:0] rq [SLOTS + 4];
  int full_served = 0, same_buf_k = 0, multi_grant = 0, late_fill = 0;

  initial begin
    repeat (20 * SLOTS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model: schedule granted at the start of slot t+3 for requests of slot t.
  task automatic model(input int t, output logic [M-1:0][K-1:0] ev, output int eo [M][K]);
    int cand [M][K][K];       // [buffer][port][copy] output or -1
    logic [M-1:0][N-1:0] r, live;
    bit taken [N];
    bit filled [M][K];
    int hsel [M][K];
    r = rq[t];
    live = rq[t + 2];
    for (int j = 0; j < M; j++) for (int p = 0; p < K; p++) for (int i = 0; i < K; i++) cand[j][p][i] = -1;
    for (int i = 0; i < K; i++)
      for (int k = 0; k < K; k++) begin
        bit bu [M];
        bit ou [M];
        for (int a = 0; a < M; a++) begin bu[a] = 0; ou[a] = 0; end
        for (int c = 0; c < P; c++) begin
          automatic int d;
          d = ((t + 1) + i + c) % M;
          for (int j = 0; j < M; j++) begin
            automatic int l;
            l = (j + d) % M;
            if (r[j][k*M + l] && !bu[j] && !ou[l]) begin
              bu[j] = 1; ou[l] = 1;
              cand[j][(k + i) % K][i] = k*M + l;
            end
          end
        end
      end
    for (int o = 0; o < N; o++) taken[o] = 0;
    for (int j = 0; j < M; j++) for (int p = 0; p < K; p++) begin filled[j][p] = 0; eo[j][p] = 0; end
    for (int c = 0; c < P; c++) begin
      for (int j = 0; j < M; j++)
        for (int p = 0; p < K; p++) begin
          hsel[j][p] = -1;
          if (!filled[j][p])
            for (int q = 0; q < K && hsel[j][p] < 0; q++) begin
              automatic int i;
              automatic int o;
              i = ((t + 2) / M + c + q) % K;
              o = cand[j][p][i];
              if (o >= 0 && !taken[o] && live[j][o]) hsel[j][p] = o;
            end
        end
      for (int o = 0; o < N; o++) begin
        bit done;
        done = 0;
        for (int b = 0; b < M && !done; b++) begin
          automatic int j;
          j = ((t + 2) + c + b) % M;
          for (int q = 0; q < K && !done; q++) begin
            automatic int p;
            p = (c + q) % K;
            if (hsel[j][p] == o) begin
              done = 1; filled[j][p] = 1; eo[j][p] = o; taken[o] = 1;
              if (c > 0) late_fill++;
            end
          end
        end
      end
    end
    for (int j = 0; j < M; j++) for (int p = 0; p < K; p++) ev[j][p] = filled[j][p];
  endtask

  initial begin
    int gcount, last_gv_cycle, cycle;
    for (int t = 0; t < SLOTS + 4; t++) begin
      for (int j = 0; j < M; j++) rq[t][j] = N'($urandom & $urandom);
      if (t % 37 == 5) rq[t] = '1;
      if (t % 37 == 20) begin rq[t] = '0; rq[t][1] = N'('hF0); end
    end
    // keep the live requests equal to the snapshot around the directed slots
    for (int t = 0; t < SLOTS; t++)
      if (t % 37 == 5 || t % 37 == 20) rq[t + 2] = rq[t];
    req_live = rq[0];
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    cycle = 0; last_gv_cycle = -1;
    for (int t = 0; t < SLOTS; t++) begin
      for (int c = 0; c < P; c++) begin
        req_live = rq[t];
        checks++;
        if (slot_last != (c == P - 1)) failures++;
        if (grant_valid) begin
          logic [M-1:0][K-1:0] ev;
          int eo [M][K];
          bit used [N];
          checks++;
          if (c != 0 || (last_gv_cycle >= 0 && cycle - last_gv_cycle != P)) begin
            failures++; $display("FAIL grant period at slot %0d", t);
          end
          last_gv_cycle = cycle;
          if (t >= 3) begin
            model(t - 3, ev, eo);
            gcount = 0;
            for (int o = 0; o < N; o++) used[o] = 0;
            for (int j = 0; j < M; j++) begin
              int nb;
              nb = 0;
              for (int p = 0; p < K; p++) begin
                checks++;
                if (gv[j][p] != ev[j][p] || (gv[j][p] && int'(go[j][p]) != eo[j][p])) begin
                  failures++; $display("FAIL slot %0d buffer %0d port %0d: %0d/%0d exp %0d/%0d",
                                       t, j, p, gv[j][p], go[j][p], ev[j][p], eo[j][p]);
                end
                if (gv[j][p]) begin
                  checks++;
                  if (used[go[j][p]] || !rq[t - 1][j][go[j][p]]) failures++;
                  used[go[j][p]] = 1;
                  gcount++; nb++;
                end
              end
              if (nb > 1) multi_grant++;
            end
            if ((t - 3) % 37 == 5) begin
              checks++;
              if (gcount != N) begin failures++; $display("FAIL full matrix served %0d", gcount); end
              else full_served++;
            end
            if ((t - 3) % 37 == 20) begin
              checks++;
              if (gcount < ((K < M) ? K : M)) begin failures++; $display("FAIL one buffer got %0d", gcount); end
              else same_buf_k++;
            end
          end
        end
        @(negedge clk);
        cycle++;
      end
    end
    checks++;
    if (full_served == 0 || same_buf_k == 0 || multi_grant == 0 || late_fill == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("full=%0d one_buffer_K=%0d multi_grant=%0d late_fill=%0d", full_served, same_buf_k, multi_grant, late_fill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
