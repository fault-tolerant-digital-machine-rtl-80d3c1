// failsafe_nand: NAND-only realisation of the fail-safe three-state machine.
//
// The AND-OR equations of failsafe_km are mapped onto two levels of NAND
// gates: nine level-2 NANDs form the complemented product terms and three
// 3-input level-1 NANDs form D1..D3 (the y1.y3-style two-variable terms use
// 2-input NANDs). Fault-free behaviour equals failsafe_km: hold on x = 0,
// 011 -> 101 -> 110 -> 011 on x = 1. Under a stuck-at-0 fault the machine
// either keeps working or falls into an F-state: a fault at a level-1 gate
// output gives 000, a fault at a level-2 gate output forces the level-1
// gate to 1 and gives 111. fstate0/fstate1 flag those two F-states.
// The gate structure follows the source; the reset to 011 and the two
// F-state flags are this design's choices. D flip-flops, rising edge.
module failsafe_nand (
  input  logic       clk,
  input  logic       rst,       // synchronous, loads state 011
  input  logic       x,         // 1: advance, 0: hold
  output logic [1:3] y,
  output logic       fstate0,   // F-state 000 (fault in a level-1 gate)
  output logic       fstate1    // F-state 111 (fault in a level-2 gate)
);
  logic xn;
  // level 2
  logic n13, n12x0, n23x1;   // feeding D1
  logic n12, n23x0, n13x1;   // feeding D2
  logic n23, n13x0, n12x1;   // feeding D3
  // level 1
  logic [1:3] d;

  assign xn = ~x;

  assign n13   = ~(y[1] & y[3]);
  assign n12x0 = ~(xn & y[1] & y[2]);
  assign n23x1 = ~(x & y[2] & y[3]);
  assign n12   = ~(y[1] & y[2]);
  assign n23x0 = ~(xn & y[2] & y[3]);
  assign n13x1 = ~(x & y[1] & y[3]);
  assign n23   = ~(y[2] & y[3]);
  assign n13x0 = ~(xn & y[1] & y[3]);
  assign n12x1 = ~(x & y[1] & y[2]);

  assign d[1] = ~(n13 & n12x0 & n23x1);
  assign d[2] = ~(n12 & n23x0 & n13x1);
  assign d[3] = ~(n23 & n13x0 & n12x1);

  always_ff @(posedge clk) begin
    if (rst) y <= 3'b011;
    else     y <= d;
  end

  assign fstate0 = (y == 3'b000);
  assign fstate1 = (y == 3'b111);
endmodule
