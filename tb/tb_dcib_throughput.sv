// Throughput testbench of dcib_switch at its default size (16 x 16, four
// common input buffers of four ports, DEPTH = 8). Every input offers one cell
// per slot (100 % load) with a uniformly random destination. After a warm-up
// the testbench counts delivered cells per output per slot and reports the
// throughput as a fraction of the N cells per slot an ideal output-queued
// switch would deliver at this load. It checks that every delivered cell is
// on its own output and that throughput stays above 90 %.
module tb_dcib_throughput;
  import tdrr_pkg::*;
  localparam int N = N_DEF, K = K_DEF, M = N / K, P = (K > M) ? K : M;
  localparam int WARM = 200, SLOTS = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  cell_t [N-1:0] in_cell, out_cell;
  logic  [N-1:0] drop, grant_v;
  idx_t  [N-1:0] grant_o;
  logic          slot_last, grant_valid;
  dcib_switch dut (.clk, .rst_n, .in_cell, .drop, .out_cell, .slot_last, .grant_valid,
                   .grant_v, .grant_o);

  int delivered = 0, dropped = 0;
  bit measuring = 0;

  initial begin
    repeat ((SLOTS + WARM + 10) * P * 2) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    for (int o = 0; o < N; o++)
      if (out_cell[o].valid) begin
        checks++;
        if (int'(out_cell[o].dest) != o) failures++;
        if (measuring) delivered++;
      end
  end

  initial begin
    real thr;
    in_cell = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int s = 0; s < WARM + SLOTS; s++) begin
      measuring = (s >= WARM);
      for (int c = 0; c < P; c++) begin
        if (c == 0)
          for (int i = 0; i < N; i++) begin
            in_cell[i].valid = 1'b1;
            in_cell[i].dest = idx_t'($urandom % N);
            in_cell[i].payload = PAYLOAD_W'(s);
          end
        #1;
        if (measuring) for (int i = 0; i < N; i++) if (in_cell[i].valid && drop[i]) dropped++;
        @(negedge clk);
        in_cell = '0;
      end
    end
    thr = real'(delivered) / real'(SLOTS * N);
    $display("throughput=%0.4f of line rate, cells dropped=%0d of %0d offered", thr, dropped, SLOTS * N);
    checks++;
    if (thr < 0.90) begin failures++; $display("FAIL throughput below 90 %%"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
