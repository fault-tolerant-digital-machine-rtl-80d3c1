// bit_select: successor selector of the first PROM state machine.
//
// Each PROM word of that machine holds two successors of the current state:
// the next address and output for x = 1 and those for x = 0, laid out as
// {next_x1[3:0], out_x1, next_x0[3:0], out_x0}. The bit-select circuit
// passes the half chosen by the external input x on to the address buffer
// and the machine output. Combinational. The source gives its function; the
// word layout and the multiplexer form are this design's choice.
module bit_select (
  input  logic [9:0] word,
  input  logic       x,
  output logic [3:0] next_addr,
  output logic       out
);
  always_comb begin
    if (x) {next_addr, out} = word[9:5];
    else   {next_addr, out} = word[4:0];
  end
endmodule
