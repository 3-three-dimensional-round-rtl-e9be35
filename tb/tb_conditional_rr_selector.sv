// Self-checking testbench of conditional_rr_selector (M = 4, K = 4): random
// request sets and priority starts; the expected grant is one port of one
// buffer, chosen by the port sequence inside the buffer and the round-robin
// over buffers.
module tb_conditional_rr_selector;
  import tdrr_pkg::*;
  localparam int M = 4, K = 4;
  int checks = 0, failures = 0;

  logic [M-1:0][K-1:0] req, gnt, eg;
  idx_t ps, bs;
  conditional_rr_selector #(.M(M), .K(K)) dut (.req, .port_start(ps), .buf_start(bs), .gnt);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      bit done;
      for (int j = 0; j < M; j++) req[j] = K'($urandom & $urandom);
      ps = idx_t'($urandom % K);
      bs = idx_t'($urandom % M);
      eg = '0; done = 0;
      for (int r = 0; r < M && !done; r++) begin
        automatic int j;
        j = (int'(bs) + r) % M;
        for (int q = 0; q < K && !done; q++) begin
          automatic int p;
          p = (int'(ps) + q) % K;
          if (req[j][p]) begin eg[j][p] = 1; done = 1; end
        end
      end
      #1;
      checks++;
      if (gnt !== eg) begin failures++; $display("FAIL t=%0d req=%h gnt=%h exp=%h", t, req, gnt, eg); end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
