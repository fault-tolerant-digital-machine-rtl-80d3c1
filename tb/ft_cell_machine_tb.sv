// ft_cell_machine_tb: checks the three-state machine of fault-tolerant
// cell-blocks against its state graph (q0 -1-> q1 -1-> q2 -1/1-> q2, every
// x = 0 arrow back to q0, z = 1 only on q2 with x = 1).
// Directed: from q0 with x = 1 the machine must visit q1, q2, q2.
// Fault free: 300 random clocks; every copy of every cell and of z must match.
// Faults, 80 random clocks each, with a reset between them; the 2-of-3
// vote over the copies of each cell and of z must stay right, and every
// fault must disturb some copy or sub-unit:
//   single faults on the voted wires between cells (a majority output of
//   q0 stuck at 0, of q1 stuck at 1, of q2 stuck at 1) and on one copy of x;
//   a sub-unit flip-flop stuck at the same position in all three cells
//   (sub-unit 0 at 0, sub-unit 1 at 1, sub-unit 2 at 1).
// Faults inside a cell are applied to all three cells explicitly: some
// simulators apply a force inside one instance of a repeated module to
// every instance, so a single in-cell fault could not be relied on.
module ft_cell_machine_tb;
  int checks = 0, failures = 0, masked = 0;
  logic clk = 0, rst = 1, x = 0;
  logic [2:0] cell_q [3];
  logic [2:0] z;
  int s;

  ft_cell_machine dut (.clk(clk), .rst(rst), .x(x), .cell_q(cell_q), .z(z));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic vote(input logic [2:0] v);
    return (v[0] & v[1]) | (v[1] & v[2]) | (v[0] & v[2]);
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: s=%0d x=%b q0=%b q1=%b q2=%b z=%b", what, s, x,
               cell_q[0], cell_q[1], cell_q[2], z);
    end
  endtask

  task automatic clear();
    rst = 1; @(negedge clk); rst = 0; s = 0;
  endtask

  // strict: every copy must be right; otherwise only the votes
  task automatic run(input int n, input bit strict, input string what);
    bit disturbed = 0;
    for (int i = 0; i < n; i++) begin
      x = 1'($urandom);
      #1;
      for (int st = 0; st < 3; st++) begin
        if (strict) check(cell_q[st] == {3{s == st}}, what);
        else        check(vote(cell_q[st]) == (s == st), what);
        if (cell_q[st] != {3{s == st}}) disturbed = 1;
      end
      if (strict) check(z == {3{s == 2 && x}}, {what, " z"});
      else        check(vote(z) == (s == 2 && x), {what, " z"});
      if (z != {3{s == 2 && x}}) disturbed = 1;
      // sub-unit outputs ahead of the voters
      if (dut.u_q0.s_x1 != {3{s == 0 && x}} || dut.u_q0.s_x0 != {3{s == 0 && !x}} ||
          dut.u_q1.s_x1 != {3{s == 1 && x}} || dut.u_q1.s_x0 != {3{s == 1 && !x}} ||
          dut.u_q2.s_x1 != {3{s == 2 && x}} || dut.u_q2.s_x0 != {3{s == 2 && !x}})
        disturbed = 1;
      @(negedge clk);
      s = !x ? 0 : (s == 0 ? 1 : 2);
    end
    if (disturbed) masked++;
  endtask

  initial begin
    @(negedge clk); rst = 0; s = 0;
    x = 1;
    check(cell_q[0] == 3'b111, "start in q0");
    @(negedge clk); check(cell_q[1] == 3'b111 && cell_q[0] == 3'b000, "q0 -> q1");
    @(negedge clk); check(cell_q[2] == 3'b111 && z == 3'b111, "q1 -> q2, z = 1");
    @(negedge clk); check(cell_q[2] == 3'b111 && z == 3'b111, "q2 holds on x = 1");
    x = 0; #1 check(z == 3'b000, "z = 0 on x = 0");
    @(negedge clk); check(cell_q[0] == 3'b111, "q2 -> q0 on x = 0");
    clear();
    run(300, 1, "fault free");
    check(masked == 0, "no disturbance without fault");

    force dut.u_q0.g_sub[0].u_cell.q = 1'b0;
    force dut.u_q1.g_sub[0].u_cell.q = 1'b0;
    force dut.u_q2.g_sub[0].u_cell.q = 1'b0;  run(80, 0, "sub 0 q s-a-0 in every cell");
    release dut.u_q0.g_sub[0].u_cell.q;
    release dut.u_q1.g_sub[0].u_cell.q;
    release dut.u_q2.g_sub[0].u_cell.q;        clear();
    force dut.u_q0.g_sub[1].u_cell.q = 1'b1;
    force dut.u_q1.g_sub[1].u_cell.q = 1'b1;
    force dut.u_q2.g_sub[1].u_cell.q = 1'b1;  run(80, 0, "sub 1 q s-a-1 in every cell");
    release dut.u_q0.g_sub[1].u_cell.q;
    release dut.u_q1.g_sub[1].u_cell.q;
    release dut.u_q2.g_sub[1].u_cell.q;        clear();
    force dut.u_q0.g_sub[2].u_cell.q = 1'b1;
    force dut.u_q1.g_sub[2].u_cell.q = 1'b1;
    force dut.u_q2.g_sub[2].u_cell.q = 1'b1;  run(80, 0, "sub 2 q s-a-1 in every cell");
    release dut.u_q0.g_sub[2].u_cell.q;
    release dut.u_q1.g_sub[2].u_cell.q;
    release dut.u_q2.g_sub[2].u_cell.q;        clear();
    force dut.ox1[0][1] = 1'b0;               run(80, 0, "q0 majority x1 copy 1 s-a-0");
    release dut.ox1[0][1];                     clear();
    force dut.ox1[1][0] = 1'b1;               run(80, 0, "q1 majority x1 copy 0 s-a-1");
    release dut.ox1[1][0];                     clear();
    force dut.ox0[2][2] = 1'b1;               run(80, 0, "q2 majority x0 copy 2 s-a-1");
    release dut.ox0[2][2];                     clear();
    force dut.xt[1] = 1'b0;                   run(80, 0, "x copy 1 s-a-0");
    release dut.xt[1];                         clear();
    check(masked == 7, "every fault disturbed a copy or a sub-unit");
    $display("faults masked: %0d of 7", masked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
