// bit_select_tb: random words; x = 1 must return bits 9..5 and x = 0 bits
// 4..0 as {next address, output}.
module bit_select_tb;
  int checks = 0, failures = 0;
  logic [9:0] word;
  logic x, out;
  logic [3:0] next_addr;

  bit_select dut (.word(word), .x(x), .next_addr(next_addr), .out(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      word = 10'($urandom); x = 1'($urandom);
      #1;
      checks++;
      if (x ? ({next_addr, out} != word[9:5]) : ({next_addr, out} != word[4:0])) begin
        failures++;
        $display("FAIL word=%b x=%b next=%b out=%b", word, x, next_addr, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
