// Self-checking testbench of atomic_rr_scheduler (M = 4). Each slot uses a
// random request matrix and a random start diagonal; the testbench computes
// the 2DRR matching itself (diagonals visited in order, a request granted when
// its row and column are both still free) and compares it with the result
// the block offers on the last cycle of the slot. It also checks that the
// result is a matching contained in the requests and that it is maximal.
module tb_atomic_rr_scheduler;
  import tdrr_pkg::*;
  localparam int M = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic last;
  logic [M-1:0][M-1:0] req;
  idx_t diag;
  logic [M-1:0] mv;
  idx_t [M-1:0] ml;
  atomic_rr_scheduler #(.M(M)) dut (.clk, .rst_n, .last, .req, .diag,
                                    .match_v_next(mv), .match_l_next(ml));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int base;
    bit rowu[M], colu[M];
    int em[M];
    last = 0; req = '0; diag = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int s = 0; s < 400; s++) begin
      for (int j = 0; j < M; j++) req[j] = M'($urandom & $urandom);
      if (s % 50 == 0) req = '1;
      base = $urandom % M;
      for (int j = 0; j < M; j++) begin rowu[j] = 0; colu[j] = 0; em[j] = -1; end
      for (int c = 0; c < M; c++) begin
        automatic int d;
        d = (base + c) % M;
        for (int j = 0; j < M; j++) begin
          automatic int l;
          l = (j + d) % M;
          if (req[j][l] && !rowu[j] && !colu[l]) begin rowu[j] = 1; colu[l] = 1; em[j] = l; end
        end
      end
      for (int c = 0; c < M; c++) begin
        diag = idx_t'((base + c) % M);
        last = (c == M - 1);
        #1;
        if (last) begin
          for (int j = 0; j < M; j++) begin
            checks++;
            if (mv[j] != (em[j] >= 0) || (em[j] >= 0 && int'(ml[j]) != em[j])) begin
              failures++; $display("FAIL slot %0d row %0d", s, j);
            end
            // maximality: an unmatched row has no request to a free column
            if (!mv[j]) for (int l = 0; l < M; l++) begin
              checks++;
              if (req[j][l] && !colu[l]) failures++;
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
