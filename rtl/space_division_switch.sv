// Space-division (cross-point) switch, N x N.
// Input i is link p of common buffer j, i = j*K + p. The scheduler's grant
// gives, per input, whether it sends and to which output; on `cfg_load` the
// switch turns this into a per-output source selection and keeps it until the
// next load. Each cycle every output takes the cell of its selected input.
// The document names the block and its configuration input; the per-output
// multiplexer form and the output register are this design's choices.
// Timing: the configuration is in force from the cycle after `cfg_load`; an
// input cell appears on its output one cycle later (registered output).
// An assertion checks that no two inputs are configured to one output.
module space_division_switch
  import tdrr_pkg::*;
#(
  parameter int unsigned N = N_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_load,
  input  logic  [N-1:0]     cfg_v,     // input i sends
  input  idx_t  [N-1:0]     cfg_o,     // to this output
  input  cell_t [N-1:0]     in_cell,
  output cell_t [N-1:0]     out_cell
);
  logic [N-1:0] sel_v, sel_v_n;
  idx_t [N-1:0] sel_i, sel_i_n;

  always_comb begin
    sel_v_n = '0;
    sel_i_n = '0;
    for (int i = 0; i < N; i++)
      if (cfg_v[i] && int'(cfg_o[i]) < N) begin
        sel_v_n[cfg_o[i]] = 1'b1;
        sel_i_n[cfg_o[i]] = idx_t'(i);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_v    <= '0;
      sel_i    <= '0;
      out_cell <= '0;
    end else begin
      if (cfg_load) begin
        sel_v <= sel_v_n;
        sel_i <= sel_i_n;
      end
      for (int o = 0; o < N; o++)
        out_cell[o] <= sel_v[o] ? in_cell[sel_i[o]] : '0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n && cfg_load)
      for (int a = 0; a < N; a++)
        for (int b = a + 1; b < N; b++)
          assert (!(cfg_v[a] && cfg_v[b] && cfg_o[a] == cfg_o[b]))
            else $error("inputs %0d and %0d both configured to output %0d", a, b, cfg_o[a]);
  end
endmodule
