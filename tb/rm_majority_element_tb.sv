// rm_majority_element_tb: checks the Reed-Muller majority element.
// For every 3-bit information word the code word (B1 = A1^A2, B2 = A2^A3,
// B3 = A3^A1) is formed; the element rebuilding A1 from (A1, A2^B1, A3^B3)
// must return A1 with no error and with any single one of the five bits it
// reads inverted. All 32 input patterns are also compared with a majority
// of three computed by counting.
module rm_majority_element_tb;
  int checks = 0, failures = 0;
  logic a, b, c, d, e, y;

  rm_majority_element dut (.a(a), .b(b), .c(c), .d(d), .e(e), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:1] A, B;
    logic [4:0] in, flip;
    for (int v = 0; v < 32; v++) begin
      {a, b, c, d, e} = 5'(v);
      #1;
      checks++;
      if (y !== ((int'(a) + int'(b ^ c) + int'(d ^ e)) >= 2)) failures++;
    end
    for (int v = 0; v < 8; v++) begin
      A = 3'(v);
      B = {A[3] ^ A[1], A[2] ^ A[3], A[1] ^ A[2]};
      in = {A[1], A[2], B[1], A[3], B[3]};
      for (int f = -1; f < 5; f++) begin
        flip = (f < 0) ? 5'b0 : 5'(1 << f);
        {a, b, c, d, e} = in ^ flip;
        #1;
        checks++;
        if (y !== A[1]) begin
          failures++;
          $display("FAIL A=%b flip=%b y=%b", A, flip, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
