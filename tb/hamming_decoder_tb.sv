// hamming_decoder_tb: for all 16 information values the 7-bit word is built
// here (P1, P2, P4 even parity over positions {1,3,5,7}, {2,3,6,7},
// {4,5,6,7}; data in 3, 5, 6, output in 7). With no error the decoder must
// pass the data and give syndrome 0; with any one of the seven positions
// inverted it must return the original data and a syndrome equal to the
// position number. A textbook example (code word 0001111 read
// as 0001011, syndrome 5) is checked too.
module hamming_decoder_tb;
  int checks = 0, failures = 0;
  logic [1:7] word;
  logic [2:0] next_addr, syndrome;
  logic out;

  hamming_decoder dut (.word(word), .next_addr(next_addr), .out(out), .syndrome(syndrome));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: word=%b next=%b out=%b syn=%0d", what, word, next_addr, out, syndrome);
    end
  endtask

  initial begin
    logic [1:7] cw;
    logic [3:0] info;
    for (int v = 0; v < 16; v++) begin
      info = 4'(v);
      cw = '0;
      cw[3] = info[3]; cw[5] = info[2]; cw[6] = info[1]; cw[7] = info[0];
      cw[1] = cw[3] ^ cw[5] ^ cw[7];
      cw[2] = cw[3] ^ cw[6] ^ cw[7];
      cw[4] = cw[5] ^ cw[6] ^ cw[7];
      word = cw; #1;
      check({next_addr, out} == info && syndrome == 0, "clean word");
      for (int p = 1; p <= 7; p++) begin
        word = cw;
        word[p] = ~word[p];
        #1;
        check({next_addr, out} == info && syndrome == 3'(p), $sformatf("error at %0d", p));
      end
    end
    word = 7'b0001011; #1;
    check(syndrome == 3'd5 && {next_addr, out} == 4'b0111, "worked example");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
