// alu: the datapath ALU, adding or subtracting its two inputs.
//
// aluop = 0 gives a + b (add, addi, and the lw/sw address); aluop = 1 gives
// a - b, used by beq to compare two registers. `zero` (the z output) is 1
// when the result is 0 and selects the branch target together with the BR
// control signal. Purely combinational. The one-bit ALUop, the z output and
// which instructions set ALUop follow the control description; that ALUop = 1
// means subtract is this design's reading of how beq compares.
module alu #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             aluop,
  output logic [WIDTH-1:0] result,
  output logic             zero
);

  assign result = aluop ? (a - b) : (a + b);
  assign zero   = (result == '0);

endmodule
