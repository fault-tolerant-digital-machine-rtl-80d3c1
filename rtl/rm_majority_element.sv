// rm_majority_element: error-correcting majority element for the
// Reed-Muller (6,3) code of the fault-tolerant counter.
//
// With the parity-check matrix rows 110|100, 011|010, 101|001 every
// information bit can be computed three independent ways, e.g.
//   A1 = A1 = A2 xor B1 = A3 xor B3.
// The element forms y = Maj(a, b xor c, d xor e): a 3-input majority gate
// fed directly by one flip-flop output and through two exclusive-OR gates by
// two pairs of others. If at most one of the five inputs is wrong, y is
// right. Feeding complemented information bits (Q-bar outputs) gives the
// complemented literal in the same way, since A1' = A2' xor B1 = A3' xor B3.
// Structure follows the source. Combinational.
module rm_majority_element (
  input  logic a,   // the bit itself
  input  logic b,   // first relation: b xor c
  input  logic c,
  input  logic d,   // second relation: d xor e
  input  logic e,
  output logic y
);
  logic r1, r2;
  assign r1 = b ^ c;
  assign r2 = d ^ e;
  assign y  = (a & r1) | (r1 & r2) | (a & r2);
endmodule
