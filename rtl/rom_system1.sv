// rom_system1: PROM state machine, first form.
//
// The state of the machine is an address held in a four-bit address buffer
// of D flip-flops. The address selects one of sixteen PROM words; each word
// holds both possible successors of that state (8 next-address bits and 2
// output bits). The bit-select circuit picks the successor for the current
// external input x; on the rising clock edge it is loaded into the address
// buffer. The function implemented is set entirely by the PROM contents, so
// the same hardware runs any graph of up to 16 states after reprogramming.
//
// Default contents (INIT) encode the five-state graph q0..q4 used as the
// example, with state qi at address i:
//   q0: x=1 -> q1/0, x=0 -> q3/0     q1: x=1 -> q2/0, x=0 -> q0/0
//   q2: x=1 -> q3/1, x=0 -> q0/0     q3: x=1 -> q4/1, x=0 -> q3/0
//   q4: x=1 -> q0/1, x=0 -> q4/0
// z is the Mealy output of the arrow being taken (combinational in state
// and x). The structure and table follow the source; the synchronous reset to
// address 0 (q0) and the programming port are this design's choices.
module rom_system1 #(
  parameter ftdm_pkg::sys1_image_t INIT = ftdm_pkg::sys1_image()
) (
  input  logic       clk,
  input  logic       rst,        // synchronous: state <= 0000
  input  logic       x,
  output logic [3:0] state,
  output logic       z,
  input  logic       prog_we,
  input  logic [3:0] prog_addr,
  input  logic [9:0] prog_data
);
  logic [9:0] word;
  logic [3:0] next_addr;

  prom #(.WORDS(16), .WIDTH(10), .INIT(INIT)) u_prom (
    .clk(clk), .addr(state), .data(word),
    .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data)
  );

  bit_select u_sel (.word(word), .x(x), .next_addr(next_addr), .out(z));

  always_ff @(posedge clk) begin
    if (rst) state <= '0;
    else     state <= next_addr;
  end
endmodule
