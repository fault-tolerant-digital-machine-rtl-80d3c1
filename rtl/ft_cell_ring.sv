// ft_cell_ring: N-state cyclic machine built from fault-tolerant cell-blocks.
//
// State i moves to state i+1 (mod N_STATES) when x = 1 and stays when x = 0,
// so the machine counts x = 1 clocks modulo N_STATES in one-hot form. Cell i
// takes its own x=0 output (the self-loop) and the x=1 output of cell i-1 as
// state inputs; every connection is triplicated as in ft_cell_block, so a
// single logical fault is masked.
//
// N_STATES defaults to 7, the seven-state example of the source, which
// simulated this machine with a reduced cell-block; here it is built from
// the full fault-tolerant cell-block. The reset into state 0 and the single
// x input fanned out to the three copies are this design's choices.
// state[k] is the one-hot vector seen in sub-unit copy k; one step per
// rising clock edge.
module ft_cell_ring #(
  parameter int N_STATES = 7
) (
  input  logic                clk,
  input  logic                rst,       // synchronous: enter state 0
  input  logic                x,
  output logic [N_STATES-1:0] state [3]  // state[copy][cell]
);
  logic [2:0] xt;
  logic [2:0] ox1 [N_STATES];
  logic [2:0] ox0 [N_STATES];
  logic [2:0] cq  [N_STATES];

  assign xt = {3{x}};

  for (genvar i = 0; i < N_STATES; i++) begin : g_cell
    localparam int PREV = (i == 0) ? N_STATES - 1 : i - 1;
    logic [2:0] sin [3];

    for (genvar k = 0; k < 3; k++) begin : g_in
      assign sin[k] = {1'b0, ox1[PREV][k], ox0[i][k]};
      assign state[k][i] = cq[i][k];
    end

    ft_cell_block #(.N_IN(3)) u_cell (
      .clk(clk), .rst(rst), .init(i == 0), .state_in(sin), .x(xt),
      .out_x1(ox1[i]), .out_x0(ox0[i]), .q(cq[i])
    );
  end
endmodule
