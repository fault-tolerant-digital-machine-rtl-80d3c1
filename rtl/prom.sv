// prom: reprogrammable read-only memory holding a state graph.
//
// WORDS words of WIDTH bits. The read port is asynchronous, like the
// address decoder and transistor matrix of a bipolar or MOS PROM: data
// follows addr combinationally. Contents start as the image INIT (word i is
// INIT[i]) and can be rewritten in the field through the programming port,
// which models an electrically alterable part: with prog_we = 1, prog_data is
// written to prog_addr on the rising clock edge.
//
// The source only says the memory is a reprogrammable ROM addressed through
// a decoder; the single-word programming port and its timing are this
// design's choice.
module prom #(
  parameter int                           WORDS = 16,
  parameter int                           WIDTH = 4,
  parameter logic [WORDS-1:0][WIDTH-1:0]  INIT  = '0
) (
  input  logic                     clk,
  input  logic [$clog2(WORDS)-1:0] addr,
  output logic [WIDTH-1:0]         data,
  input  logic                     prog_we,
  input  logic [$clog2(WORDS)-1:0] prog_addr,
  input  logic [WIDTH-1:0]         prog_data
);
  logic [WIDTH-1:0] mem [WORDS];

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = INIT[i];
  end

  always @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_data;
  end

  assign data = mem[addr];
endmodule
