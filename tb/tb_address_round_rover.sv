// Self-checking testbench of address_round_rover. Two instances are run: the
// default square case (M = K = 4, slot of 4 cycles) and an uneven one
// (M = 3, K = 2, slot of 3 cycles). Expected counter values are kept by the
// testbench from its own cycle count.
module tb_address_round_rover;
  import tdrr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  idx_t cyc_a, db_a, cb_a, cyc_b, db_b, cb_b;
  logic last_a, last_b;
  address_round_rover            u_a (.clk, .rst_n, .cyc(cyc_a), .last(last_a), .diag_base(db_a), .copy_base(cb_a));
  address_round_rover #(.M(3), .K(2)) u_b (.clk, .rst_n, .cyc(cyc_b), .last(last_b), .diag_base(db_b), .copy_base(cb_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      #1;
      check(cyc_a == idx_t'(t % 4) && last_a == (t % 4 == 3), "A cycle");
      check(db_a == idx_t'((t / 4) % 4) && cb_a == idx_t'((t / 16) % 4), "A bases");
      check(cyc_b == idx_t'(t % 3) && last_b == (t % 3 == 2), "B cycle");
      check(db_b == idx_t'((t / 3) % 3) && cb_b == idx_t'((t / 9) % 2), "B bases");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
