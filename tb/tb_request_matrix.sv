// Self-checking testbench of request_matrix (N = 16, K = 4): random request
// patterns are loaded or held; the snapshot and every atomic-matrix view are
// compared with the testbench's own copy of the loaded value.
module tb_request_matrix;
  import tdrr_pkg::*;
  localparam int N = 16, K = 4, M = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load;
  logic [M-1:0][N-1:0] req_in, req, expv;
  logic [K-1:0][M-1:0][M-1:0] atomic;
  request_matrix #(.N(N), .K(K)) dut (.clk, .rst_n, .load, .req_in, .req, .atomic);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; req_in = '0; expv = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      load = ($urandom % 3) == 0;
      for (int j = 0; j < M; j++) req_in[j] = N'($urandom);
      @(posedge clk);
      if (load) expv = req_in;
      #1;
      checks++;
      if (req !== expv) begin failures++; $display("FAIL snapshot t=%0d", t); end
      for (int k = 0; k < K; k++)
        for (int j = 0; j < M; j++)
          for (int l = 0; l < M; l++) begin
            checks++;
            if (atomic[k][j][l] !== expv[j][k*M + l]) failures++;
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
