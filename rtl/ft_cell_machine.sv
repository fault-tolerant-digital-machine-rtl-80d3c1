// ft_cell_machine: three-state sequence detector built from fault-tolerant
// cell-blocks.
//
// The state graph has states q0, q1, q2 and one input x:
//   q0: x=0 -> q0/0, x=1 -> q1/0
//   q1: x=0 -> q0/0, x=1 -> q2/0
//   q2: x=0 -> q0/0, x=1 -> q2/1
// so z = 1 while x has been 1 for a third consecutive clock or longer. Each
// state is one ft_cell_block and each arrow is a wire from a state output to
// a state input: cell q0 collects the x=0 outputs of all three cells, cell
// q1 the x=1 output of q0, and cell q2 the x=1 outputs of q1 and of itself.
// Every wire is triplicated, copy k feeding sub-unit k of the next cell, so
// any single logical fault in a sub-unit or in one majority gate is masked
// and the state carried on to the next cell is right.
//
// Interface: x is fanned out to the three copies of every cell; cell_q[s]
// holds the three sub-unit flip-flops of state s; z holds the three voted
// copies of the output arrow q2 -x=1-> q2. The graph and its realisation
// follow the source; the single x input and the synchronous reset into q0
// are this design's choices. One step per rising clock edge.
module ft_cell_machine (
  input  logic       clk,
  input  logic       rst,        // synchronous: enter q0
  input  logic       x,
  output logic [2:0] cell_q [3], // cell_q[state][copy]
  output logic [2:0] z           // three copies of the Mealy output
);
  logic [2:0] xt;
  logic [2:0] ox1 [3];           // ox1[state][copy]
  logic [2:0] ox0 [3];
  logic [2:0] in_q0 [3], in_q1 [3], in_q2 [3];   // [copy] -> 3 state inputs

  assign xt = {3{x}};

  for (genvar k = 0; k < 3; k++) begin : g_wire
    assign in_q0[k] = {ox0[2][k], ox0[1][k], ox0[0][k]};
    assign in_q1[k] = {2'b00, ox1[0][k]};
    assign in_q2[k] = {1'b0, ox1[2][k], ox1[1][k]};
  end

  ft_cell_block #(.N_IN(3)) u_q0 (
    .clk(clk), .rst(rst), .init(1'b1), .state_in(in_q0), .x(xt),
    .out_x1(ox1[0]), .out_x0(ox0[0]), .q(cell_q[0])
  );
  ft_cell_block #(.N_IN(3)) u_q1 (
    .clk(clk), .rst(rst), .init(1'b0), .state_in(in_q1), .x(xt),
    .out_x1(ox1[1]), .out_x0(ox0[1]), .q(cell_q[1])
  );
  ft_cell_block #(.N_IN(3)) u_q2 (
    .clk(clk), .rst(rst), .init(1'b0), .state_in(in_q2), .x(xt),
    .out_x1(ox1[2]), .out_x0(ox0[2]), .q(cell_q[2])
  );

  assign z = ox1[2];
endmodule
