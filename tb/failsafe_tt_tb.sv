// failsafe_tt_tb: checks the fail-safe three-state machine.
// Fault free: 300 clocks of random x compared with the transition table
// (hold on x = 0, 011 -> 101 -> 110 -> 011 on x = 1).
// Stuck-at-0: the first-level AND gate y1.y3 of D1 is forced to 0. With
// x = 0 from state 101 the machine must go 101 -> 001 -> 000 and then stay
// in the F-state 000 for any input, and every faulty next state must be
// covered by the fault-free one (faults can only remove ones).
module failsafe_tt_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, x = 0;
  logic [1:3] y;
  logic fstate;
  logic [1:3] code [3] = '{3'b011, 3'b101, 3'b110};
  int s;

  failsafe_tt dut (.clk(clk), .rst(rst), .x(x), .y(y), .fstate(fstate));

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
    logic [1:3] prev, good;
    @(negedge clk); rst = 0; s = 0;
    check(y == code[0] && !fstate, "reset state");
    for (int n = 0; n < 300; n++) begin
      x = 1'($urandom);
      @(negedge clk);
      if (x) s = (s + 1) % 3;
      check(y == code[s] && !fstate, "fault-free step");
    end
    // walk to 101, then inject the fault
    while (y != 3'b101) begin x = 1; @(negedge clk); end
    force dut.p13_1 = 1'b0;
    x = 0;
    @(negedge clk); check(y == 3'b001, "101 -> 001 under fault");
    @(negedge clk); check(y == 3'b000 && fstate, "001 -> 000 under fault");
    for (int n = 0; n < 20; n++) begin
      x = 1'($urandom);
      @(negedge clk);
      check(y == 3'b000 && fstate, "F-state is absorbing");
    end
    release dut.p13_1;
    // a fault never adds ones: compare faulty and fault-free successors
    rst = 1; @(negedge clk); rst = 0;
    force dut.p23_1 = 1'b0;
    for (int n = 0; n < 50; n++) begin
      x = 1'($urandom);
      prev = y;
      // fault-free successor of prev
      good = prev;
      for (int i = 0; i < 3; i++) if (prev == code[i]) good = x ? code[(i + 1) % 3] : code[i];
      if (!(prev inside {3'b011, 3'b101, 3'b110})) good = 3'b111;
      @(negedge clk);
      check((y & ~good) == 3'b000, "faulty successor covered by fault-free one");
    end
    check(y == 3'b000, "machine ended in F-state");
    release dut.p23_1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
