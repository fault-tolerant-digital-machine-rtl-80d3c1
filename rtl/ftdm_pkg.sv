// ftdm_pkg: types, codes and memory images shared by the fault-tolerant and
// fail-safe machines.
//
// * maj3()          2-out-of-3 majority, f = xy + yz + xz (the majority-logic
//                   gate used for triple-modular redundancy).
// * Hamming (7,4)   positions are numbered 1..7 from left to right; positions
//                   1, 2 and 4 hold the even-parity check bits P1, P2, P4 over
//                   {1,3,5,7}, {2,3,6,7} and {4,5,6,7}. Positions 3, 5 and 6
//                   carry the next-state address (most significant bit in 3)
//                   and position 7 carries the machine output bit.
// * sys1_image()    16 x 10-bit PROM image of the first PROM state machine:
//                   each word holds both successors of one state.
// * sys2_image()    16 x 4-bit PROM image of the improved PROM state machine,
//                   addressed by {state, X}: word = {next state, output}.
// * sys2_ham_image() the same image with every word Hamming coded (7 bits).
//
// All three images encode the five-state example graph q0..q4 that the
// source uses for its PROM machines. The bit placement inside the Hamming
// word follows its coding table; the placement of fields inside the other
// words is this design's choice.
package ftdm_pkg;

  typedef logic [1:7] ham_word_t;   // ham_word_t[p] is code position p

  function automatic logic maj3(input logic a, input logic b, input logic c);
    return (a & b) | (b & c) | (a & c);
  endfunction

  // Encode 3 next-state bits and 1 output bit into a 7-bit Hamming word.
  function automatic ham_word_t ham_encode(input logic [2:0] nxt, input logic out);
    ham_word_t w;
    w[3] = nxt[2];
    w[5] = nxt[1];
    w[6] = nxt[0];
    w[7] = out;
    w[1] = w[3] ^ w[5] ^ w[7];
    w[2] = w[3] ^ w[6] ^ w[7];
    w[4] = w[5] ^ w[6] ^ w[7];
    return w;
  endfunction

  // Syndrome {c4, c2, c1}: the number of the position in error, 0 if none.
  function automatic logic [2:0] ham_syndrome(input ham_word_t w);
    return {w[4] ^ w[5] ^ w[6] ^ w[7],
            w[2] ^ w[3] ^ w[6] ^ w[7],
            w[1] ^ w[3] ^ w[5] ^ w[7]};
  endfunction

  // Successor and output of the five-state graph, for state s and input x.
  // Returns {next[2:0], out}. States above 4 are unused and return to q0.
  function automatic logic [3:0] graph5(input logic [2:0] s, input logic x);
    unique case ({s, x})
      4'b000_0: return {3'd3, 1'b0};
      4'b000_1: return {3'd1, 1'b0};
      4'b001_0: return {3'd0, 1'b0};
      4'b001_1: return {3'd2, 1'b0};
      4'b010_0: return {3'd0, 1'b0};
      4'b010_1: return {3'd3, 1'b1};
      4'b011_0: return {3'd3, 1'b0};
      4'b011_1: return {3'd4, 1'b1};
      4'b100_0: return {3'd4, 1'b0};
      4'b100_1: return {3'd0, 1'b1};
      default:  return {3'd0, 1'b0};
    endcase
  endfunction

  typedef logic [15:0][3:0] sys2_image_t;
  typedef logic [15:0][6:0] sys2_ham_image_t;
  typedef logic [15:0][9:0] sys1_image_t;

  // Word at address {s, x}.
  function automatic sys2_image_t sys2_image();
    sys2_image_t img;
    for (int a = 0; a < 16; a++) img[a] = graph5(3'(a >> 1), a[0]);
    return img;
  endfunction

  function automatic sys2_ham_image_t sys2_ham_image();
    sys2_ham_image_t img;
    logic [3:0] info;
    for (int a = 0; a < 16; a++) begin
      info   = graph5(3'(a >> 1), a[0]);
      img[a] = ham_encode(info[3:1], info[0]);
    end
    return img;
  endfunction

  // Word at address s (4-bit state): {next_x1[3:0], out_x1, next_x0[3:0], out_x0}.
  function automatic sys1_image_t sys1_image();
    sys1_image_t img;
    logic [3:0] i1, i0;
    for (int a = 0; a < 16; a++) begin
      i1 = graph5(3'(a), 1'b1);
      i0 = graph5(3'(a), 1'b0);
      img[a] = (a < 5) ? {1'b0, i1, 1'b0, i0} : '0;
    end
    return img;
  endfunction

endpackage
