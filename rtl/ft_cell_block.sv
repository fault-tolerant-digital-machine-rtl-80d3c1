// ft_cell_block: fault-tolerant cell-block by triple-modular redundancy.
//
// Three identical cell_block sub-units run in step. Each has its own copy of
// the state inputs and of the external input X. Their X = 1 state outputs
// feed three majority gates and their X = 0 state outputs feed three more
// (six in all); majority gate k drives copy k of that state output, which is
// wired to sub-unit k of the successor cell. A single logical fault in any
// sub-unit or in any one majority gate is therefore outvoted here or in the
// next cell, and the fault never spreads from cell to cell.
//
// Interface: every signal that crosses the cell boundary is triplicated
// (index 0..2 is the copy / sub-unit). q[k] is sub-unit k's flip-flop.
// Structure follows the source (three sub-units, six majority gates,
// separate X per sub-unit). The synchronous load of init on rst is this
// design's choice. Timing as cell_block: q on the rising clock edge, state
// outputs combinational.
module ft_cell_block #(
  parameter int N_IN = 3
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            init,
  input  logic [N_IN-1:0] state_in [3],
  input  logic [2:0]      x,
  output logic [2:0]      out_x1,
  output logic [2:0]      out_x0,
  output logic [2:0]      q
);
  logic [2:0] s_x1, s_x0;   // sub-unit state outputs

  for (genvar k = 0; k < 3; k++) begin : g_sub
    cell_block #(.N_IN(N_IN)) u_cell (
      .clk     (clk),
      .rst     (rst),
      .init    (init),
      .state_in(state_in[k]),
      .x       (x[k]),
      .out_x1  (s_x1[k]),
      .out_x0  (s_x0[k]),
      .q       (q[k])
    );
  end

  for (genvar k = 0; k < 3; k++) begin : g_vote
    majority_gate u_m_x1 (.a(s_x1[0]), .b(s_x1[1]), .c(s_x1[2]), .y(out_x1[k]));
    majority_gate u_m_x0 (.a(s_x0[0]), .b(s_x0[1]), .c(s_x0[2]), .y(out_x0[k]));
  end
endmodule
