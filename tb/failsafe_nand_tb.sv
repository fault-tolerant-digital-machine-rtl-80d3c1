// failsafe_nand_tb: checks the NAND-only fail-safe three-state machine.
// Fault free: 300 clocks of random x against the transition table.
// Level-1 fault: the D1 NAND output stuck at 0 must lead to F-state 000.
// Level-2 fault: the y1.y3 NAND output stuck at 0 forces D1 to 1 and must
// lead to F-state 111. Both F-states must hold for any input once reached.
module failsafe_nand_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, x = 0;
  logic [1:3] y;
  logic fstate0, fstate1;
  logic [1:3] code [3] = '{3'b011, 3'b101, 3'b110};
  int s;

  failsafe_nand dut (.clk(clk), .rst(rst), .x(x), .y(y), .fstate0(fstate0), .fstate1(fstate1));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: y=%b x=%b", what, y, x);
    end
  endtask

  initial begin
    @(negedge clk); rst = 0; s = 0;
    check(y == code[0] && !fstate0 && !fstate1, "reset state");
    for (int n = 0; n < 300; n++) begin
      x = 1'($urandom);
      @(negedge clk);
      if (x) s = (s + 1) % 3;
      check(y == code[s] && !fstate0 && !fstate1, "fault-free step");
    end
    // level-1 (odd level) fault
    force dut.d[1] = 1'b0;
    for (int n = 0; n < 10; n++) begin x = 1; @(negedge clk); end
    check(y == 3'b000 && fstate0, "level-1 fault ends in 000");
    for (int n = 0; n < 10; n++) begin
      x = 1'($urandom); @(negedge clk);
      check(y == 3'b000, "000 absorbing");
    end
    release dut.d[1];
    // level-2 (even level) fault
    rst = 1; @(negedge clk); rst = 0;
    force dut.n13 = 1'b0;
    for (int n = 0; n < 10; n++) begin x = 1'(n % 2); @(negedge clk); end
    check(y == 3'b111 && fstate1, "level-2 fault ends in 111");
    for (int n = 0; n < 10; n++) begin
      x = 1'($urandom); @(negedge clk);
      check(y == 3'b111, "111 absorbing");
    end
    release dut.n13;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
