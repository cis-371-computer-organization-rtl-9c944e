// mux2: WIDTH-bit 2-to-1 multiplexer, out = sel ? in1 : in0.
//
// Purely combinational. Every two-way selector of the single-cycle datapath
// is one of these: the destination-register mux (Rdst), the ALU second-input
// mux (ALUinB), the register write-data mux (Rwd), the branch mux (BR & z)
// and the jump mux (JP).
module mux2 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  output logic [WIDTH-1:0] out
);

  assign out = sel ? in1 : in0;

endmodule
