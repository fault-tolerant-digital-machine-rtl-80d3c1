// failsafe_km: fail-safe three-state machine, modified Karnaugh-map technique.
//
// Same machine as failsafe_tt (hold on x = 0; 011 -> 101 -> 110 -> 011 on
// x = 1; 2-out-of-3 state code), but the next-state functions come from a
// Karnaugh map in which only monotonic groupings and the permitted
// don't-cares are used. This needs fewer gates:
//   D1 = y1.y3 + x'.y1.y2 + x.y2.y3
//   D2 = y1.y2 + x'.y2.y3 + x.y1.y3
//   D3 = y2.y3 + x'.y1.y3 + x.y1.y2
// State variables appear uncomplemented only, so a stuck-at-0 fault in the
// AND-OR logic drives the machine to the F-state 000 (fstate = 1) or leaves
// it working. Equations follow the source; the reset to 011 and the fstate
// output are this design's choices. One D flip-flop per state bit, rising
// edge.
module failsafe_km (
  input  logic       clk,
  input  logic       rst,      // synchronous, loads state 011
  input  logic       x,        // 1: advance, 0: hold
  output logic [1:3] y,
  output logic       fstate    // F-state 000
);
  logic t13, t12n, t23x;   // D1 product terms
  logic t12, t23n, t13x;   // D2
  logic t23, t13n, t12x;   // D3
  logic [1:3] d;

  assign t13  = y[1] & y[3];
  assign t12n = ~x & y[1] & y[2];
  assign t23x =  x & y[2] & y[3];
  assign t12  = y[1] & y[2];
  assign t23n = ~x & y[2] & y[3];
  assign t13x =  x & y[1] & y[3];
  assign t23  = y[2] & y[3];
  assign t13n = ~x & y[1] & y[3];
  assign t12x =  x & y[1] & y[2];

  assign d[1] = t13 | t12n | t23x;
  assign d[2] = t12 | t23n | t13x;
  assign d[3] = t23 | t13n | t12x;

  always_ff @(posedge clk) begin
    if (rst) y <= 3'b011;
    else     y <= d;
  end

  assign fstate = (y == 3'b000);
endmodule
