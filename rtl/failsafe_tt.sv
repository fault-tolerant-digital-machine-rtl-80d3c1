// failsafe_tt: fail-safe three-state machine, transition-table technique.
//
// The machine holds its state while x = 0 and steps 011 -> 101 -> 110 -> 011
// while x = 1. The three states use the 2-out-of-3 code {011, 101, 110}: no
// code word covers another, so every next-state function can be written with
// uncomplemented state variables only (monotonic increasing). A stuck-at-0
// fault in the AND-OR logic can then only remove 1s, and the machine falls
// into the F-state 000, from which no product term can lift it; fstate
// flags that state.
//
// Next-state logic (each minterm of the transition table reduced to the
// state variables that are 1 in it):
//   D1 = (y1.y3 + y1.y2).x' + (y2.y3 + y1.y3).x
//   D2 = (y2.y3 + y1.y2).x' + (y1.y3 + y1.y2).x
//   D3 = (y2.y3 + y1.y3).x' + (y2.y3 + y1.y2).x
// These equations and the AND/OR two-level structure follow the source.
// The synchronous reset to 011 and the fstate output are this design's
// choices. Timing: one D flip-flop per state bit, state changes on the rising
// clock edge.
module failsafe_tt (
  input  logic       clk,
  input  logic       rst,      // synchronous, loads state 011
  input  logic       x,        // 1: advance, 0: hold
  output logic [1:3] y,        // state vector y1 y2 y3
  output logic       fstate    // machine is in the F-state 000
);
  // first-level AND gates (pairs of state variables), one set per D input
  logic p13_1, p12_1, p23_1, p13_1x;   // D1
  logic p23_2, p12_2, p13_2, p12_2x;   // D2
  logic p23_3, p13_3, p23_3x, p12_3;   // D3
  // second level: OR of the pairs, AND with x' or x, OR into D
  logic o1n, o1x, o2n, o2x, o3n, o3x;
  logic [1:3] d;

  assign p13_1  = y[1] & y[3];
  assign p12_1  = y[1] & y[2];
  assign p23_1  = y[2] & y[3];
  assign p13_1x = y[1] & y[3];
  assign p23_2  = y[2] & y[3];
  assign p12_2  = y[1] & y[2];
  assign p13_2  = y[1] & y[3];
  assign p12_2x = y[1] & y[2];
  assign p23_3  = y[2] & y[3];
  assign p13_3  = y[1] & y[3];
  assign p23_3x = y[2] & y[3];
  assign p12_3  = y[1] & y[2];

  assign o1n = p13_1 | p12_1;
  assign o1x = p23_1 | p13_1x;
  assign o2n = p23_2 | p12_2;
  assign o2x = p13_2 | p12_2x;
  assign o3n = p23_3 | p13_3;
  assign o3x = p23_3x | p12_3;

  assign d[1] = (o1n & ~x) | (o1x & x);
  assign d[2] = (o2n & ~x) | (o2x & x);
  assign d[3] = (o3n & ~x) | (o3x & x);

  always_ff @(posedge clk) begin
    if (rst) y <= 3'b011;
    else     y <= d;
  end

  assign fstate = (y == 3'b000);
endmodule
