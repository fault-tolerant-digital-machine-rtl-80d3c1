// majority_gate: bitwise 2-out-of-3 majority-logic gate.
//
// y = a.b + b.c + a.c for every bit. This is the voter of triple-modular
// redundancy: with three copies of a signal at its inputs, any one wrong copy
// is outvoted. Purely combinational, no clock. WIDTH (default 1) lets one
// instance vote a bus; each bit is an independent majority gate.
module majority_gate #(
  parameter int WIDTH = 1
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] y
);
  assign y = (a & b) | (b & c) | (a & c);
endmodule
