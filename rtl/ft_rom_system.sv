// ft_rom_system: single-fault-tolerant reprogrammable PROM state machine.
//
// The improved PROM machine (rom_system2) is made fault tolerant without
// triplicating the memory, so reprogramming still means writing one PROM.
// Each PROM word is stored Hamming coded (7 bits: next state and output plus
// three check bits). The hardware around the memory is triplicated: three
// hamming_decoder units each correct the word read, three 3-bit address
// buffers each load the next state from their own decoder, and majority
// gates vote the three buffers into the PROM address and the three decoded
// output bits into z. A single error in the stored word is corrected by
// every decoder; a fault in one decoder or one buffer is outvoted and the
// faulty buffer is reloaded with a good value by the next clock if the fault
// has gone.
//
// Address = {voted state, x}. Default contents (INIT) are the Hamming-coded
// five-state example graph. Ports: state is the voted state, buf_state the
// three buffers. The use of Hamming-coded memory, three decoders, three
// buffers and majority logic follows the source; the exact placement of the
// voters (one for the address, one for the output) and the reset to state
// 000 are this design's choices. Timing: one state step per rising clock
// edge; z is combinational in state and x.
module ft_rom_system #(
  parameter ftdm_pkg::sys2_ham_image_t INIT = ftdm_pkg::sys2_ham_image()
) (
  input  logic       clk,
  input  logic       rst,          // synchronous: all buffers <= 000
  input  logic       x,
  output logic [2:0] state,        // voted state
  output logic [2:0] buf_state [3],
  output logic       z,
  output logic [2:0] syndrome,     // syndrome seen by decoder 0
  input  logic       prog_we,
  input  logic [3:0] prog_addr,
  input  logic [6:0] prog_data
);
  logic [6:0] word;
  logic [2:0] dec_next [3];
  logic [2:0] dec_out;
  logic [2:0] dec_syn  [3];

  prom #(.WORDS(16), .WIDTH(7), .INIT(INIT)) u_prom (
    .clk(clk), .addr({state, x}), .data(word),
    .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data)
  );

  for (genvar k = 0; k < 3; k++) begin : g_lane
    hamming_decoder u_dec (
      .word(word), .next_addr(dec_next[k]), .out(dec_out[k]), .syndrome(dec_syn[k])
    );

    always_ff @(posedge clk) begin
      if (rst) buf_state[k] <= '0;
      else     buf_state[k] <= dec_next[k];
    end
  end

  majority_gate #(.WIDTH(3)) u_vote_state (
    .a(buf_state[0]), .b(buf_state[1]), .c(buf_state[2]), .y(state)
  );
  majority_gate u_vote_out (.a(dec_out[0]), .b(dec_out[1]), .c(dec_out[2]), .y(z));

  assign syndrome = dec_syn[0];
endmodule
