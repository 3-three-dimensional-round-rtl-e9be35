// Fairness testbench of tdrr_scheduler at its default size (N = 16, K = 4,
// M = 4). Each trial holds a random pattern of permanently backlogged queues
// (every queue has cells all the time) for 300 slots and records, for every
// backlogged (buffer, output) queue, the longest gap between two of its
// grants. No backlogged queue may starve: every one must be served, and no
// gap may exceed MAX_GAP slots. Every schedule is also checked to be
// conflict-free and to use only backlogged queues.
module tb_tdrr_fairness;
  import tdrr_pkg::*;
  localparam int N = 16, K = 4, M = 4, P = 4, SLOTS = 300, TRIALS = 12, MAX_GAP = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [M-1:0][N-1:0] req_live;
  logic [M-1:0][K-1:0] gv;
  idx_t [M-1:0][K-1:0] go;
  logic grant_valid, slot_last;
  tdrr_scheduler dut (.clk, .rst_n, .req_live, .grant_v(gv), .grant_o(go), .grant_valid, .slot_last);

  initial begin
    repeat (TRIALS * (SLOTS + 4) * P + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_g [M][N];
    int worst;
    worst = 0;
    req_live = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int tr = 0; tr < TRIALS; tr++) begin
      for (int j = 0; j < M; j++)
        req_live[j] = (tr == 0) ? '1 : N'($urandom | $urandom);
      if (tr == 1) begin req_live = '0; req_live[0] = '1; req_live[1] = N'('h00FF); end
      for (int j = 0; j < M; j++) for (int o = 0; o < N; o++) last_g[j][o] = 0;
      for (int s = 0; s < SLOTS; s++)
        for (int c = 0; c < P; c++) begin
          if (grant_valid && s >= 3) begin
            bit used [N];
            for (int o = 0; o < N; o++) used[o] = 0;
            for (int j = 0; j < M; j++)
              for (int p = 0; p < K; p++)
                if (gv[j][p]) begin
                  checks++;
                  if (used[go[j][p]] || !req_live[j][go[j][p]]) failures++;
                  used[go[j][p]] = 1;
                  if (s - last_g[j][go[j][p]] > worst) worst = s - last_g[j][go[j][p]];
                  last_g[j][go[j][p]] = s;
                end
          end
          @(negedge clk);
        end
      for (int j = 0; j < M; j++)
        for (int o = 0; o < N; o++)
          if (req_live[j][o]) begin
            checks++;
            if (SLOTS - last_g[j][o] > MAX_GAP) begin
              failures++; $display("FAIL trial %0d: queue (%0d,%0d) starved", tr, j, o);
            end
          end
    end
    checks++;
    if (worst > MAX_GAP) begin failures++; $display("FAIL longest gap %0d slots", worst); end
    $display("longest gap between grants of a backlogged queue: %0d slots", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
