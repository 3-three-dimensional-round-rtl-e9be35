// Self-checking testbench of first_projection_screen (N = 16, K = 4, M = 4):
// random first-projection results are loaded or held, and every screen
// position [buffer j][port p][copy i] is compared with the result of atomic
// matrix (p - i) mod K of copy i.
module tb_first_projection_screen;
  import tdrr_pkg::*;
  localparam int N = 16, K = 4, M = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load;
  logic [K-1:0][K-1:0][M-1:0] rv, hv;
  idx_t [K-1:0][K-1:0][M-1:0] ro, ho;
  logic [M-1:0][K-1:0][K-1:0] sv;
  idx_t [M-1:0][K-1:0][K-1:0] so;
  first_projection_screen #(.N(N), .K(K)) dut (.clk, .rst_n, .load, .res_v(rv), .res_o(ro),
                                               .scr_v(sv), .scr_o(so));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; rv = '0; ro = '0; hv = '0; ho = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      load = $urandom % 2;
      for (int i = 0; i < K; i++)
        for (int k = 0; k < K; k++)
          for (int j = 0; j < M; j++) begin
            rv[i][k][j] = $urandom % 2;
            ro[i][k][j] = idx_t'($urandom % N);
          end
      @(posedge clk);
      if (load) begin hv = rv; ho = ro; end
      #1;
      for (int j = 0; j < M; j++)
        for (int p = 0; p < K; p++)
          for (int i = 0; i < K; i++) begin
            automatic int k;
            k = ((p - i) % K + K) % K;
            checks++;
            if (sv[j][p][i] != hv[i][k][j] || so[j][p][i] != ho[i][k][j]) begin
              failures++; $display("FAIL t=%0d j=%0d p=%0d i=%0d", t, j, p, i);
            end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
