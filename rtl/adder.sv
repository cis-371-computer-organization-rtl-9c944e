// adder: WIDTH-bit adder, sum = a + b modulo 2**WIDTH.
//
// Purely combinational. In the single-cycle datapath one computes PC+4 and a
// second adds the shifted branch offset to PC+4 to form the branch target.
module adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum
);

  assign sum = a + b;

endmodule
