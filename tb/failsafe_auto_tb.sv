// failsafe_auto_tb: checks the fail-safe autonomous four-state cycle
// 1001 -> 0011 -> 0101 -> 1010 -> 1001 for 40 clocks, then forces the AND
// gate y1.y3 (in D1) to 0: from 1010 the machine must go to 0001 and then to
// the F-state 0000 and stay there.
module failsafe_auto_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [1:4] y;
  logic fstate;
  logic [1:4] seq [4] = '{4'b1001, 4'b0011, 4'b0101, 4'b1010};

  failsafe_auto dut (.clk(clk), .rst(rst), .y(y), .fstate(fstate));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: y=%b", what, y);
    end
  endtask

  initial begin
    @(negedge clk); rst = 0;
    for (int n = 0; n < 40; n++) begin
      check(y == seq[n % 4] && !fstate, "cycle");
      @(negedge clk);
    end
    while (y != 4'b1010) @(negedge clk);
    force dut.a13 = 1'b0;
    @(negedge clk); check(y == 4'b0001, "1010 -> 0001 under fault");
    @(negedge clk); check(y == 4'b0000 && fstate, "0001 -> 0000");
    repeat (5) begin @(negedge clk); check(y == 4'b0000, "F-state absorbing"); end
    release dut.a13;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
