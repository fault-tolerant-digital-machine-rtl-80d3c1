// cell_block_tb: checks one self-resetting cell-block.
// Directed: a set cell with x = 1 and no active state input enables its x=1
// output and resets itself on the next clock; with its x=0 output fed back
// as a state input (self-loop) and x = 0 it stays set for many clocks; an
// active state input sets a clear cell. Random: 500 clocks of random state
// inputs and x against the rule "the cell holds a 1 after a clock exactly
// when one of its state inputs was active", with out_x1 = q.x and
// out_x0 = q.x'.
module cell_block_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, init = 1, x = 1;
  logic [2:0] state_in;
  logic out_x1, out_x0, q;
  logic loop_en = 0;
  logic [2:0] sin_drv = '0;

  cell_block #(.N_IN(3)) dut (
    .clk(clk), .rst(rst), .init(init), .state_in(state_in), .x(x),
    .out_x1(out_x1), .out_x0(out_x0), .q(q)
  );

  // optional self-loop on input 0
  assign state_in = loop_en ? {sin_drv[2:1], out_x0} : sin_drv;

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: q=%b x=%b in=%b o1=%b o0=%b", what, q, x, state_in, out_x1, out_x0);
    end
  endtask

  initial begin
    logic exp_q;
    @(negedge clk); rst = 0;
    check(q == 1 && out_x1 == 1 && out_x0 == 0, "set cell enables x=1 output");
    @(negedge clk);
    check(q == 0 && out_x1 == 0, "cell resets itself");
    // set through a state input
    sin_drv = 3'b100; @(negedge clk); sin_drv = '0;
    check(q == 1, "state input sets the cell");
    // self-loop, x = 0: must hold
    loop_en = 1; x = 0;
    repeat (10) begin @(negedge clk); check(q == 1 && out_x0 == 1, "self-loop holds"); end
    // x = 1 leaves the loop
    x = 1; @(negedge clk);
    check(q == 0, "leaves state on x = 1");
    loop_en = 0;
    // random
    for (int n = 0; n < 500; n++) begin
      sin_drv = 3'($urandom);
      if ($urandom % 2) sin_drv = '0;
      x = 1'($urandom);
      #1;
      check(out_x1 == (q & x) && out_x0 == (q & ~x), "state outputs");
      exp_q = |sin_drv;
      @(negedge clk);
      check(q == exp_q, "next q");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
