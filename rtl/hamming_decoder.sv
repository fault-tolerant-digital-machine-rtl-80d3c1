// hamming_decoder: single-error-correcting decoder for the 7-bit PROM word.
//
// Positions are numbered 1..7 from the left; 1, 2 and 4 are even-parity
// check bits over {1,3,5,7}, {2,3,6,7} and {4,5,6,7}; 3, 5, 6 hold the next
// address (MSB first) and 7 the output bit. Three parity gates recompute
// the checks and give the syndrome {c4, c2, c1}, the number of the position
// in error (0: none). If it names an information position (3, 5, 6 or 7)
// that bit is inverted on its way through; an error in a check bit (1, 2 or
// 4) needs no action, and with no error the word passes unchanged.
// Combinational. Function and bit placement follow the source; the
// syndrome output port is this design's addition for observation.
module hamming_decoder
  import ftdm_pkg::*;
(
  input  ham_word_t  word,
  output logic [2:0] next_addr,   // corrected positions 3, 5, 6
  output logic       out,         // corrected position 7
  output logic [2:0] syndrome     // {c4, c2, c1}
);
  logic info_err;

  assign syndrome = ham_syndrome(word);
  // an information position is one that is not a power of two
  assign info_err = (syndrome == 3'd3) || (syndrome == 3'd5) ||
                    (syndrome == 3'd6) || (syndrome == 3'd7);

  assign next_addr[2] = word[3] ^ (info_err && syndrome == 3'd3);
  assign next_addr[1] = word[5] ^ (info_err && syndrome == 3'd5);
  assign next_addr[0] = word[6] ^ (info_err && syndrome == 3'd6);
  assign out          = word[7] ^ (info_err && syndrome == 3'd7);
endmodule
