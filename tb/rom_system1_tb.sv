// rom_system1_tb: checks the first PROM state machine against the five-state
// graph (q0: 1->q1/0 0->q3/0, q1: 1->q2/0 0->q0/0, q2: 1->q3/1 0->q0/0,
// q3: 1->q4/1 0->q3/0, q4: 1->q0/1 0->q4/0) for 300 random clocks, one state
// step per clock. Then state q0's word is reprogrammed so that x = 0 leads
// to q2 with output 1, and that arrow is checked.
module rom_system1_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, x = 0, z;
  logic [3:0] state;
  logic we = 0;
  logic [3:0] paddr = 0;
  logic [9:0] pdata = 0;
  int s;

  rom_system1 dut (
    .clk(clk), .rst(rst), .x(x), .state(state), .z(z),
    .prog_we(we), .prog_addr(paddr), .prog_data(pdata)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // {next, out} of the graph
  function automatic int step(input int st, input logic xi, output logic o);
    case (st)
      0: begin o = 0;          return xi ? 1 : 3; end
      1: begin o = 0;          return xi ? 2 : 0; end
      2: begin o = xi;         return xi ? 3 : 0; end
      3: begin o = xi;         return xi ? 4 : 3; end
      4: begin o = xi;         return xi ? 0 : 4; end
      default: begin o = 0;    return 0; end
    endcase
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: s=%0d state=%0d x=%b z=%b", what, s, state, x, z);
    end
  endtask

  initial begin
    logic o;
    int ns;
    @(negedge clk); rst = 0; s = 0;
    for (int n = 0; n < 300; n++) begin
      x = 1'($urandom);
      ns = step(s, x, o);
      #1 check(state == 4'(s) && z == o, "graph step");
      @(negedge clk);
      s = ns;
    end
    // reprogram q0: x=1 -> q1/0 (unchanged), x=0 -> q2/1
    we = 1; paddr = 0; pdata = {4'd1, 1'b0, 4'd2, 1'b1};
    @(negedge clk); we = 0;
    rst = 1; @(negedge clk); rst = 0;
    x = 0; #1 check(z == 1, "reprogrammed output");
    @(negedge clk); check(state == 4'd2, "reprogrammed arrow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
