// majority_gate_tb: exhaustive check of the 2-out-of-3 majority gate, for a
// single bit and for a 4-bit bus, against a count of the ones at each bit.
module majority_gate_tb;
  int checks = 0, failures = 0;
  logic       a1, b1, c1, y1;
  logic [3:0] a4, b4, c4, y4;

  majority_gate            dut1 (.a(a1), .b(b1), .c(c1), .y(y1));
  majority_gate #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .c(c4), .y(y4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a1, b1, c1} = 3'(v);
      #1;
      checks++;
      if (y1 !== ((int'(a1) + int'(b1) + int'(c1)) >= 2)) begin
        failures++;
        $display("FAIL 1-bit %b%b%b -> %b", a1, b1, c1, y1);
      end
    end
    for (int n = 0; n < 200; n++) begin
      a4 = 4'($urandom); b4 = 4'($urandom); c4 = 4'($urandom);
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (y4[i] !== ((int'(a4[i]) + int'(b4[i]) + int'(c4[i])) >= 2)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
