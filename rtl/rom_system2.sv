// rom_system2: PROM state machine, improved form.
//
// The current state (three-bit address buffer) and the external input x
// together address the PROM, so each word holds only the one successor that
// applies: word = {next_state[2:0], out}. On the rising clock edge the next
// state is loaded into the buffer. Compared with rom_system1 no bit-select
// logic is needed and the memory is narrower. The graph is set by the PROM
// contents and can be changed by reprogramming.
//
// Address = {state, x}. Default contents (INIT) encode the five-state
// example graph (see rom_system1); the ten used words are
//   000/0->011/0 000/1->001/0 001/0->000/0 001/1->010/0 010/0->000/0
//   010/1->011/1 011/0->011/0 011/1->100/1 100/0->100/0 100/1->000/1
// and the six unused words send the machine to state 000.
// z is the Mealy output (combinational in state and x). Structure and table
// follow the source; the bit order of the address, the contents of unused
// words, the reset to 000 and the programming port are this design's
// choices.
module rom_system2 #(
  parameter ftdm_pkg::sys2_image_t INIT = ftdm_pkg::sys2_image()
) (
  input  logic       clk,
  input  logic       rst,        // synchronous: state <= 000
  input  logic       x,
  output logic [2:0] state,
  output logic       z,
  input  logic       prog_we,
  input  logic [3:0] prog_addr,
  input  logic [3:0] prog_data
);
  logic [3:0] word;

  prom #(.WORDS(16), .WIDTH(4), .INIT(INIT)) u_prom (
    .clk(clk), .addr({state, x}), .data(word),
    .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data)
  );

  assign z = word[0];

  always_ff @(posedge clk) begin
    if (rst) state <= '0;
    else     state <= word[3:1];
  end
endmodule
