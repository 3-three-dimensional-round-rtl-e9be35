// Self-checking testbench of highest_priority_selector (N = 16, K = 4):
// random candidates, taken outputs, live requests and start copies; the
// expected choice is the first usable candidate in round-robin order.
module tb_highest_priority_selector;
  import tdrr_pkg::*;
  localparam int N = 16, K = 4;
  int checks = 0, failures = 0;

  logic [K-1:0] cv;
  idx_t [K-1:0] co;
  logic [N-1:0] taken, live;
  logic filled, sv;
  idx_t start, so;
  highest_priority_selector #(.N(N), .K(K)) dut (.cand_v(cv), .cand_o(co), .out_taken(taken),
      .req_live(live), .filled, .start, .sel_v(sv), .sel_o(so));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int ev, eo;
      cv = K'($urandom);
      for (int i = 0; i < K; i++) co[i] = idx_t'($urandom % N);
      taken = N'($urandom);
      live = N'($urandom | $urandom);
      filled = ($urandom % 8) == 0;
      start = idx_t'($urandom % K);
      ev = 0; eo = 0;
      if (!filled)
        for (int r = 0; r < K && !ev; r++) begin
          automatic int i;
          i = (int'(start) + r) % K;
          if (cv[i] && !taken[co[i]] && live[co[i]]) begin ev = 1; eo = co[i]; end
        end
      #1;
      checks++;
      if (sv != 1'(ev) || (ev && int'(so) != eo)) begin
        failures++; $display("FAIL t=%0d got %0d/%0d exp %0d/%0d", t, sv, so, ev, eo);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
