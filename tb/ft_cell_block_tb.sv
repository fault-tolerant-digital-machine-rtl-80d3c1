// ft_cell_block_tb: checks the triple-modular-redundant cell-block.
// Fault free: 300 clocks of random (identical, triplicated) state inputs and
// x; all three copies of q, out_x1 and out_x0 must follow the single-cell
// rule (q' = OR of state inputs, out_x1 = q.x, out_x0 = q.x').
// Faults, one at a time, each for 100 random clocks: a sub-unit flip-flop
// stuck at 0 or 1, a sub-unit AND output stuck, the external input of one
// sub-unit stuck. All three voted outputs must stay right. A majority gate
// output stuck may only corrupt its own copy; the other two copies must stay
// right.
module ft_cell_block_tb;
  int checks = 0, failures = 0, masked = 0;
  logic clk = 0, rst = 1;
  logic [2:0] sin [3];
  logic [2:0] xin;
  logic [2:0] out_x1, out_x0, q;
  logic ref_q;

  ft_cell_block #(.N_IN(3)) dut (
    .clk(clk), .rst(rst), .init(1'b1), .state_in(sin), .x(xin),
    .out_x1(out_x1), .out_x0(out_x0), .q(q)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: q=%b ref=%b x=%b o1=%b o0=%b", what, q, ref_q, xin, out_x1, out_x0);
    end
  endtask

  // run n clocks; mask = copies that must be right
  task automatic run(input int n, input logic [2:0] mask, input string what);
    logic [2:0] s;
    logic xv;
    bit disturbed = 0;
    for (int i = 0; i < n; i++) begin
      s  = ($urandom % 2) ? 3'($urandom) : 3'b000;
      xv = 1'($urandom);
      for (int k = 0; k < 3; k++) sin[k] = s;
      xin = {3{xv}};
      #1;
      for (int k = 0; k < 3; k++) if (mask[k]) begin
        check(out_x1[k] == (ref_q & xv) && out_x0[k] == (ref_q & ~xv), what);
      end
      if (q != {3{ref_q}} || dut.s_x1 != {3{ref_q & xv}} || dut.s_x0 != {3{ref_q & ~xv}}) disturbed = 1;
      @(negedge clk);
      ref_q = |s;
    end
    if (disturbed || mask != 3'b111) masked++;
  endtask

  // return to a known state between fault scenarios: a released flip-flop
  // keeps its forced value until it is next written
  task automatic clear();
    rst = 1; @(negedge clk); rst = 0; ref_q = 1;
  endtask

  initial begin
    for (int k = 0; k < 3; k++) sin[k] = '0;
    xin = '0;
    @(negedge clk); rst = 0; ref_q = 1;
    run(300, 3'b111, "fault free");
    check(masked == 0, "no disturbance without fault");
    force dut.g_sub[0].u_cell.q = 1'b0;      run(100, 3'b111, "sub 0 q s-a-0");
    release dut.g_sub[0].u_cell.q;
    clear();
    force dut.g_sub[1].u_cell.q = 1'b1;      run(100, 3'b111, "sub 1 q s-a-1");
    release dut.g_sub[1].u_cell.q;
    clear();
    force dut.g_sub[2].u_cell.out_x1 = 1'b1; run(100, 3'b111, "sub 2 out_x1 s-a-1");
    release dut.g_sub[2].u_cell.out_x1;
    clear();
    force dut.g_sub[1].u_cell.x = 1'b0;      run(100, 3'b111, "sub 1 x s-a-0");
    release dut.g_sub[1].u_cell.x;
    clear();
    force dut.g_sub[0].u_cell.j = 1'b1;      run(100, 3'b111, "sub 0 J s-a-1");
    release dut.g_sub[0].u_cell.j;
    clear();
    force dut.g_vote[1].u_m_x0.y = 1'b1;     run(100, 3'b101, "majority x0 copy 1 s-a-1");
    release dut.g_vote[1].u_m_x0.y;
    clear();
    check(masked == 6, "every fault was exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
