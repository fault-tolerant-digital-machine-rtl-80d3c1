// ft_counter: single-fault-tolerant three-stage binary counter.
//
// A 3-bit up counter (information bits A3 A2 A1) is extended with three
// check bits from a modified first-order Reed-Muller code:
//   B1 = A1 xor A2,  B2 = A2 xor A3,  B3 = A3 xor A1,
// so the six flip-flops step through S0..S7 = 000|000, 001|101, 010|011,
// 011|110, 100|110, 101|011, 110|101, 111|000 (A3A2A1|B3B2B1).
// All six are T flip-flops (toggle when T = 1), which keeps the control
// logic minimal:
//   TA1 = 1          TA2 = A1         TA3 = A1.A2
//   TB1 = A1'        TB2 = A1.A2'     TB3 = A1' + A2'
// Every literal used by this logic comes from its own majority element
// (rm_majority_element), which rebuilds the literal from the flip-flops
// through the code: A1 is used three times, A1' twice, A2 once and A2'
// twice, giving eight elements. So no single faulty flip-flop or gate can
// corrupt more than one toggle input, and a single logical fault anywhere
// is masked.
//
// Outputs: the six raw flip-flops, and count, the information bits after
// correction by three further majority elements. The counter structure, code
// and equations follow the source; the three output elements, the
// synchronous reset to S0 and the enable input are this design's choices.
// Timing: count advances by one on each rising clock edge with en = 1.
module ft_counter (
  input  logic       clk,
  input  logic       rst,     // synchronous, loads S0 (all zero)
  input  logic       en,      // count enable
  output logic [3:1] a,       // raw information flip-flops A3 A2 A1
  output logic [3:1] b,       // raw check flip-flops B3 B2 B1
  output logic [2:0] count    // corrected count {A3, A2, A1}
);
  logic [3:1] an;                       // Q-bar outputs
  logic a1_0, a1_1, a1_2;               // corrected A1, three copies
  logic na1_0, na1_1;                   // corrected A1', two copies
  logic a2_0;                           // corrected A2
  logic na2_0, na2_1;                   // corrected A2', two copies
  logic [3:1] ta, tb;                   // toggle inputs

  assign an = ~a;

  // A1 = Maj(A1, A2 xor B1, A3 xor B3)
  rm_majority_element u_a1_0 (.a(a[1]), .b(a[2]), .c(b[1]), .d(a[3]), .e(b[3]), .y(a1_0));
  rm_majority_element u_a1_1 (.a(a[1]), .b(a[2]), .c(b[1]), .d(a[3]), .e(b[3]), .y(a1_1));
  rm_majority_element u_a1_2 (.a(a[1]), .b(a[2]), .c(b[1]), .d(a[3]), .e(b[3]), .y(a1_2));
  // A1' = Maj(A1', A2' xor B1, A3' xor B3)
  rm_majority_element u_na1_0 (.a(an[1]), .b(an[2]), .c(b[1]), .d(an[3]), .e(b[3]), .y(na1_0));
  rm_majority_element u_na1_1 (.a(an[1]), .b(an[2]), .c(b[1]), .d(an[3]), .e(b[3]), .y(na1_1));
  // A2 = Maj(A2, A1 xor B1, A3 xor B2)
  rm_majority_element u_a2_0 (.a(a[2]), .b(a[1]), .c(b[1]), .d(a[3]), .e(b[2]), .y(a2_0));
  // A2' = Maj(A2', A1' xor B1, A3' xor B2)
  rm_majority_element u_na2_0 (.a(an[2]), .b(an[1]), .c(b[1]), .d(an[3]), .e(b[2]), .y(na2_0));
  rm_majority_element u_na2_1 (.a(an[2]), .b(an[1]), .c(b[1]), .d(an[3]), .e(b[2]), .y(na2_1));

  assign ta[1] = 1'b1;
  assign ta[2] = a1_0;
  assign ta[3] = a1_1 & a2_0;
  assign tb[1] = na1_0;
  assign tb[2] = a1_2 & na2_0;
  assign tb[3] = na1_1 | na2_1;

  always_ff @(posedge clk) begin
    if (rst) begin
      a <= '0;
      b <= '0;
    end else if (en) begin
      a <= a ^ ta;
      b <= b ^ tb;
    end
  end

  // corrected outputs; A3 = Maj(A3, A1 xor B3, A2 xor B2)
  rm_majority_element u_out1 (.a(a[1]), .b(a[2]), .c(b[1]), .d(a[3]), .e(b[3]), .y(count[0]));
  rm_majority_element u_out2 (.a(a[2]), .b(a[1]), .c(b[1]), .d(a[3]), .e(b[2]), .y(count[1]));
  rm_majority_element u_out3 (.a(a[3]), .b(a[1]), .c(b[3]), .d(a[2]), .e(b[2]), .y(count[2]));
endmodule
