// cell_block: self-resetting state cell, one per state of a state graph.
//
// A machine is built by giving every state of its graph one cell and wiring
// each graph arrow from a state output of one cell to a state input of
// another, so the circuit is a direct copy of the graph and exactly one cell
// holds a 1 (one-hot).
//
//   J      = OR of the state inputs (an arrow into this state is active)
//   out_x1 = Q.X      arrow taken when the external input is 1
//   out_x0 = Q.X'     arrow taken when the external input is 0
//   K      = J'.(out_x1 + out_x0)
//
// The memory element is a JK flip-flop. While the cell holds a 1 it enables
// exactly one of its two state outputs; on the next clock the successor cell
// sets and this cell resets itself through K, unless the arrow leads back
// into the cell (self-loop), in which case J = 1 and the inverter-AND pair on
// the K line keeps K = 0 so the cell stays set. q is the cell's output.
//
// The gate structure follows the source (final cell-block design). The
// synchronous load of init on rst, used to place the machine in its first
// state, is this design's choice. Parameter N_IN (default 3, the number of
// state inputs in the source's simulation data) sets the width of state_in.
// Timing: q changes on the rising clock edge; the state outputs are
// combinational in q and x.
module cell_block #(
  parameter int N_IN = 3
) (
  input  logic            clk,
  input  logic            rst,       // synchronous: q <= init
  input  logic            init,
  input  logic [N_IN-1:0] state_in,  // arrows into this state
  input  logic            x,         // external input
  output logic            out_x1,    // arrow leaving on x = 1
  output logic            out_x0,    // arrow leaving on x = 0
  output logic            q
);
  logic j, jn, k, any_out;

  assign j       = |state_in;
  assign out_x1  = q & x;
  assign out_x0  = q & ~x;
  assign any_out = out_x1 | out_x0;
  assign jn      = ~j;
  assign k       = jn & any_out;

  always_ff @(posedge clk) begin
    if (rst) q <= init;
    else     q <= (j & ~q) | (~k & q);
  end
endmodule
