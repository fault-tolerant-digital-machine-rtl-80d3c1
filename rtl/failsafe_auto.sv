// failsafe_auto: fail-safe autonomous four-state counter.
//
// With no input, the machine cycles 1001 -> 0011 -> 0101 -> 1010 -> 1001 on
// every clock. The state vectors are pairwise incomparable, and the
// next-state functions, found with the autonomous form of the modified
// Karnaugh map, use uncomplemented state variables only:
//   D1 = y2 + y1.y3     D2 = y3.y4     D3 = y2 + y1.y4     D4 = y1 + y3
// A stuck-at-0 fault in this AND-OR logic either leaves the cycle intact or
// leads the machine into the F-state 0000, where it stays (fstate = 1).
// Equations follow the source; the reset to 1001 and fstate are this
// design's choices. D flip-flops, rising edge.
module failsafe_auto (
  input  logic       clk,
  input  logic       rst,      // synchronous, loads state 1001
  output logic [1:4] y,
  output logic       fstate    // F-state 0000
);
  logic a13, a34, a14;
  logic [1:4] d;

  assign a13  = y[1] & y[3];
  assign a34  = y[3] & y[4];
  assign a14  = y[1] & y[4];
  assign d[1] = y[2] | a13;
  assign d[2] = a34;
  assign d[3] = y[2] | a14;
  assign d[4] = y[1] | y[3];

  always_ff @(posedge clk) begin
    if (rst) y <= 4'b1001;
    else     y <= d;
  end

  assign fstate = (y == 4'b0000);
endmodule
