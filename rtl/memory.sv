// memory: WORDS x WIDTH storage with one shared read/write port
// (DATAIN, ADDRESS, WE, DATAOUT).
//
// Reads are combinational: dout shows the word at addr in the same cycle,
// which a single-cycle datapath needs to fetch and load within one clock.
// Writes happen on the rising clock edge when we is high. Contents are not
// reset. The datapath uses one instance as instruction memory and one as data
// memory, both addressed by word (byte address bits [1:0] dropped). The
// word count of 4096 is this design's choice; the description only says a
// memory has many words (more than 1024) and few ports.
module memory #(
  parameter int unsigned WORDS = 4096,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [WIDTH-1:0]         din,
  output logic [WIDTH-1:0]         dout
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
  end

  assign dout = mem[addr];

endmodule
