// ft_cell_ring_tb: checks the seven-state ring of fault-tolerant cell-blocks.
// The one-hot state must advance by one cell (mod 7) on every clock with
// x = 1 and hold on x = 0. Directed: 14 clocks of x = 1 (two full turns).
// Fault free: 300 random clocks, all three copies exact.
// Faults, with a reset between them; the bitwise 2-of-3 vote of the three
// one-hot copies must stay right and each fault must disturb some copy:
//   single faults on the voted wires between cells: one X = 1 majority
//     output of cell 3 stuck at 1, one X = 0 majority output of cell 0
//     stuck at 0, and two majority outputs carrying different signals
//     (X = 1 copy 0 and X = 0 copy 1) of cell 2 stuck at 1 together;
//   the same fault at the same position in every cell at once: sub-unit 0
//     flip-flop stuck at 1, sub-unit 2 flip-flop stuck at 0, sub-unit 1
//     dead (both state outputs stuck at 1), the X = 1 majority gate of
//     copy 1 stuck at 1.
// The last group is forced in every cell explicitly. Some simulators apply
// a force inside one instance of a repeated module to all its instances,
// so faults inside a cell are only ever injected in this every-cell form.
module ft_cell_ring_tb;
  localparam int N = 7;
  int checks = 0, failures = 0, masked = 0, wraps = 0;
  logic clk = 0, rst = 1, x = 0;
  logic [N-1:0] state [3];
  int s;

  ft_cell_ring #(.N_STATES(N)) dut (.clk(clk), .rst(rst), .x(x), .state(state));

  always #5 clk = ~clk;

  // fault applied at the same position in every cell
  int mode = 0;
  for (genvar i = 0; i < N; i++) begin : g_f
    always @(mode) begin
      case (mode)
        1: force dut.g_cell[i].u_cell.g_sub[0].u_cell.q = 1'b1;
        2: force dut.g_cell[i].u_cell.g_sub[2].u_cell.q = 1'b0;
        3: begin
          force dut.g_cell[i].u_cell.g_sub[1].u_cell.out_x1 = 1'b1;
          force dut.g_cell[i].u_cell.g_sub[1].u_cell.out_x0 = 1'b1;
        end
        4: force dut.g_cell[i].u_cell.g_vote[1].u_m_x1.y = 1'b1;
        default: begin
          release dut.g_cell[i].u_cell.g_sub[0].u_cell.q;
          release dut.g_cell[i].u_cell.g_sub[2].u_cell.q;
          release dut.g_cell[i].u_cell.g_sub[1].u_cell.out_x1;
          release dut.g_cell[i].u_cell.g_sub[1].u_cell.out_x0;
          release dut.g_cell[i].u_cell.g_vote[1].u_m_x1.y;
        end
      endcase
    end
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: s=%0d %b %b %b", what, s, state[0], state[1], state[2]);
    end
  endtask

  task automatic clear();
    rst = 1; @(negedge clk); rst = 0; s = 0;
  endtask

  task automatic run(input int n, input bit strict, input bit random_x, input string what);
    logic [N-1:0] exp, voted;
    bit disturbed = 0;
    for (int i = 0; i < n; i++) begin
      x = random_x ? 1'($urandom) : 1'b1;
      exp = N'(1) << s;
      voted = (state[0] & state[1]) | (state[1] & state[2]) | (state[0] & state[2]);
      if (strict) for (int k = 0; k < 3; k++) check(state[k] == exp, what);
      else        check(voted == exp, what);
      for (int k = 0; k < 3; k++) if (state[k] != exp) disturbed = 1;
      @(negedge clk);
      if (x) begin
        s = (s + 1) % N;
        if (s == 0) wraps++;
      end
    end
    if (disturbed) masked++;
  endtask

  initial begin
    @(negedge clk); rst = 0; s = 0;
    run(2 * N, 1, 0, "two turns with x = 1");
    check(wraps == 2 && s == 0, "two wraps after 14 steps");
    run(300, 1, 1, "fault free");
    check(masked == 0, "no disturbance without fault");
    force dut.ox1[3][1] = 1'b1; run(100, 0, 1, "cell 3 X=1 majority copy 1 s-a-1");
    release dut.ox1[3][1];      clear();
    force dut.ox0[0][2] = 1'b0; run(100, 0, 1, "cell 0 X=0 majority copy 2 s-a-0");
    release dut.ox0[0][2];      clear();
    force dut.ox1[2][0] = 1'b1;
    force dut.ox0[2][1] = 1'b1; run(100, 0, 1, "cell 2 two majority gates s-a-1");
    release dut.ox1[2][0];
    release dut.ox0[2][1];      clear();
    for (int m = 1; m <= 4; m++) begin
      mode = m; run(150, 0, 1, $sformatf("every-cell fault %0d", m));
      mode = 0; #1; clear();
    end
    // a dead sub-unit (mode 3) still clocks its flip-flop from voted inputs,
    // so it is the one fault that leaves every flip-flop copy undisturbed
    check(masked == 6, "every flip-flop or wire fault disturbed a copy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
