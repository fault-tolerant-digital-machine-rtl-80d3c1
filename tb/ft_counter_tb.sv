// ft_counter_tb: checks the Reed-Muller coded fault-tolerant counter.
// Fault free: from reset the six flip-flops must step through the code words
// S0..S7 (check bits B1 = A1^A2, B2 = A2^A3, B3 = A3^A1, computed here) one
// per clock, wrap, and hold while en = 0.
// Single faults: each of the six flip-flops and each of the eight majority
// elements feeding the toggle logic is forced, in turn, to 0 and to 1. For
// 20 clocks after reset the corrected count must still advance by one per
// clock. A fault is counted as masked when the raw flip-flops left the code
// yet the count stayed right.
module ft_counter_tb;
  int checks = 0, failures = 0, masked = 0;
  logic clk = 0, rst = 1, en = 0;
  logic [3:1] a, b;
  logic [2:0] count;

  ft_counter dut (.clk(clk), .rst(rst), .en(en), .a(a), .b(b), .count(count));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:1] checkbits(input logic [3:1] A);
    return {A[3] ^ A[1], A[2] ^ A[3], A[1] ^ A[2]};
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%b b=%b count=%0d", what, a, b, count);
    end
  endtask

  task automatic inject(input int f, input logic v);
    case (f)
      0:  force dut.a[1] = v;
      1:  force dut.a[2] = v;
      2:  force dut.a[3] = v;
      3:  force dut.b[1] = v;
      4:  force dut.b[2] = v;
      5:  force dut.b[3] = v;
      6:  force dut.a1_0 = v;
      7:  force dut.a1_1 = v;
      8:  force dut.a1_2 = v;
      9:  force dut.na1_0 = v;
      10: force dut.na1_1 = v;
      11: force dut.a2_0 = v;
      12: force dut.na2_0 = v;
      13: force dut.na2_1 = v;
      default: ;
    endcase
  endtask

  task automatic release_all();
    release dut.a[1]; release dut.a[2]; release dut.a[3];
    release dut.b[1]; release dut.b[2]; release dut.b[3];
    release dut.a1_0; release dut.a1_1; release dut.a1_2;
    release dut.na1_0; release dut.na1_1; release dut.a2_0;
    release dut.na2_0; release dut.na2_1;
  endtask

  initial begin
    int exp;
    bit left_code;
    @(negedge clk); rst = 0; en = 1;
    exp = 0;
    for (int n = 0; n < 20; n++) begin
      check(a == 3'(exp) && b == checkbits(3'(exp)) && count == 3'(exp), "fault-free code word");
      @(negedge clk);
      exp = (exp + 1) % 8;
    end
    en = 0;
    repeat (3) begin @(negedge clk); check(count == 3'(exp), "hold with en = 0"); end

    for (int f = 0; f < 14; f++) begin
      for (int v = 0; v < 2; v++) begin
        rst = 1; en = 1; @(negedge clk); rst = 0;
        inject(f, 1'(v));
        exp = 0;
        left_code = 0;
        for (int n = 0; n < 20; n++) begin
          check(count == 3'(exp), $sformatf("fault %0d stuck-at-%0d", f, v));
          if (a != 3'(exp) || b != checkbits(3'(exp))) left_code = 1;
          @(negedge clk);
          exp = (exp + 1) % 8;
        end
        if (left_code) masked++;
        release_all();
      end
    end
    checks++;
    if (masked < 20) begin
      failures++;
      $display("FAIL only %0d faults disturbed the flip-flops", masked);
    end
    $display("faults masked: %0d of 28", masked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
