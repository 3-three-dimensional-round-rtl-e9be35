// Self-checking testbench of space_division_switch (N = 16). Random partial
// permutations are loaded as configurations and random cells are offered
// every cycle; each output must carry, one cycle later, the cell of the input
// configured to it, or nothing.
module tb_space_division_switch;
  import tdrr_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_load;
  logic [N-1:0] cfg_v;
  idx_t [N-1:0] cfg_o;
  cell_t [N-1:0] in_cell, out_cell, exp_o;
  space_division_switch #(.N(N)) dut (.clk, .rst_n, .cfg_load, .cfg_v, .cfg_o, .in_cell, .out_cell);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int src [N];
    int perm [N];
    cfg_load = 0; cfg_v = '0; cfg_o = '0; in_cell = '0; exp_o = '0;
    for (int o = 0; o < N; o++) src[o] = -1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      checks++;
      if (out_cell !== exp_o) begin failures++; $display("FAIL t=%0d", t); end
      // cells offered now leave next cycle through the configuration in force now
      for (int i = 0; i < N; i++) begin
        in_cell[i].valid = 1'($urandom);
        in_cell[i].dest = idx_t'($urandom % N);
        in_cell[i].payload = PAYLOAD_W'($urandom);
      end
      for (int o = 0; o < N; o++) exp_o[o] = (src[o] >= 0) ? in_cell[src[o]] : '0;
      cfg_load = (t % 4 == 0);
      if (cfg_load) begin
        for (int i = 0; i < N; i++) perm[i] = i;
        perm.shuffle();
        for (int i = 0; i < N; i++) begin
          cfg_v[i] = ($urandom % 4 != 0);
          cfg_o[i] = idx_t'(perm[i]);
        end
      end
      @(negedge clk);
      if (cfg_load) begin
        for (int o = 0; o < N; o++) src[o] = -1;
        for (int i = 0; i < N; i++) if (cfg_v[i]) src[cfg_o[i]] = i;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
