// Self-checking testbench of parallel_rr_processor (N = 16, K = 4, M = 4).
// For random request matrices and start diagonals, the testbench runs its
// own model of the K phase-shifted copies of K atomic 2DRR schedulers and
// compares every copy's result at the end of the slot. It also checks that
// every copy's result gives each output to at most one buffer.
module tb_parallel_rr_processor;
  import tdrr_pkg::*;
  localparam int N = 16, K = 4, M = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic last;
  logic [K-1:0][M-1:0][M-1:0] atomic;
  idx_t diag_base, cyc;
  logic [K-1:0][K-1:0][M-1:0] rv;
  idx_t [K-1:0][K-1:0][M-1:0] ro;
  parallel_rr_processor #(.N(N), .K(K)) dut (.clk, .rst_n, .last, .atomic, .diag_base, .cyc,
                                             .res_v_next(rv), .res_o_next(ro));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit r[M][N];
    int em[K][K][M];
    bit bu[M], ou[N];
    int base;
    last = 0; atomic = '0; diag_base = '0; cyc = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int s = 0; s < 200; s++) begin
      base = $urandom % M;
      for (int j = 0; j < M; j++)
        for (int n = 0; n < N; n++) r[j][n] = (s % 40 == 0) ? 1'b1 : 1'(($urandom % 3) == 0);
      for (int k = 0; k < K; k++)
        for (int j = 0; j < M; j++)
          for (int l = 0; l < M; l++) atomic[k][j][l] = r[j][k*M + l];
      // model: copy i starts i diagonals after the slot's base
      for (int i = 0; i < K; i++)
        for (int k = 0; k < K; k++) begin
          for (int j = 0; j < M; j++) begin bu[j] = 0; em[i][k][j] = -1; end
          for (int n = 0; n < N; n++) ou[n] = 0;
          for (int c = 0; c < M; c++) begin
            automatic int d;
            d = (base + i + c) % M;
            for (int j = 0; j < M; j++) begin
              automatic int o;
              o = k*M + (j + d) % M;
              if (r[j][o] && !bu[j] && !ou[o]) begin bu[j] = 1; ou[o] = 1; em[i][k][j] = o; end
            end
          end
        end
      diag_base = idx_t'(base);
      for (int c = 0; c < M; c++) begin
        cyc = idx_t'(c);
        last = (c == M - 1);
        #1;
        if (last)
          for (int i = 0; i < K; i++) begin
            bit used[N];
            for (int n = 0; n < N; n++) used[n] = 0;
            for (int k = 0; k < K; k++)
              for (int j = 0; j < M; j++) begin
                checks++;
                if (rv[i][k][j] != (em[i][k][j] >= 0) ||
                    (rv[i][k][j] && int'(ro[i][k][j]) != em[i][k][j])) begin
                  failures++;
                  $display("FAIL slot %0d copy %0d atomic %0d buffer %0d", s, i, k, j);
                end
                if (rv[i][k][j]) begin
                  checks++;
                  if (used[ro[i][k][j]]) failures++;
                  used[ro[i][k][j]] = 1;
                end
              end
          end
        @(posedge clk);
        #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
