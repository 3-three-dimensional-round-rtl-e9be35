// Self-checking testbench of second_projection_result (N = 16, K = 4, M = 4):
// random grants to free ports and free outputs arrive over the four cycles of
// a slot; the feedback (filled ports, taken outputs) is checked every cycle
// and the delivered schedule and its one-cycle valid pulse after each slot.
module tb_second_projection_result;
  import tdrr_pkg::*;
  localparam int N = 16, K = 4, M = 4, P = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic last, gv_ok;
  logic [M-1:0][K-1:0] gnt, filled, grant_v;
  idx_t [M-1:0][K-1:0] gnt_o, grant_o;
  logic [N-1:0] out_taken;
  logic grant_valid;
  second_projection_result #(.N(N), .K(K)) dut (.clk, .rst_n, .last, .gnt, .gnt_o, .filled,
      .out_taken, .grant_v, .grant_o, .grant_valid);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M-1:0][K-1:0] mf;
    idx_t [M-1:0][K-1:0] mo;
    logic [N-1:0] mt;
    last = 0; gnt = '0; gnt_o = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    #1;
    checks++;
    if (grant_valid || grant_v != '0) failures++;
    for (int s = 0; s < 200; s++) begin
      mf = '0; mo = '0; mt = '0;
      for (int c = 0; c < P; c++) begin
        last = (c == P - 1);
        gnt = '0; gnt_o = '0;
        for (int j = 0; j < M; j++)
          for (int p = 0; p < K; p++) begin
            automatic int o;
            o = $urandom % N;
            if (!mf[j][p] && !mt[o] && ($urandom % 3 == 0)) begin
              gnt[j][p] = 1; gnt_o[j][p] = idx_t'(o); mt[o] = 1;
            end
          end
        #1;
        checks++;
        if (filled !== mf) failures++;
        checks++;
        if (c > 0 && grant_valid) failures++;
        for (int j = 0; j < M; j++)
          for (int p = 0; p < K; p++)
            if (gnt[j][p]) begin mf[j][p] = 1; mo[j][p] = gnt_o[j][p]; end
        @(posedge clk);
        #1;
        if (c < P - 1) begin
          checks++;
          if (out_taken !== mt || filled !== mf) begin failures++; $display("FAIL feedback s=%0d c=%0d", s, c); end
        end else begin
          checks++;
          if (!grant_valid || grant_v !== mf || out_taken !== '0 || filled !== '0) begin
            failures++; $display("FAIL handover s=%0d", s);
          end
          for (int j = 0; j < M; j++)
            for (int p = 0; p < K; p++)
              if (mf[j][p]) begin
                checks++;
                if (grant_o[j][p] != mo[j][p]) failures++;
              end
        end

      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
