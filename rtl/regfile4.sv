// regfile4: register file of four N-bit registers with two read ports and
// one write port, built structurally from the unit's building blocks.
//
// Each register is an nbit_reg. Read port 1 is a 4-to-1 mux of the four
// register outputs selected by rs1; read port 2 is a second mux selected by
// rs2. The write port feeds rdval to every register and enables only one:
// the 2-to-4 decoder turns rd into a one-hot vector, and each bit is ANDed
// with we. Reads are combinational; a write takes effect at the next rising
// clock edge, so a read of the register being written returns the old
// value until then. rst clears all registers (synchronous, active high).
// The structure, port names and default width of 1 follow the four-register
// construction; the reset behaviour is that of nbit_reg.
module regfile4 #(
  parameter int unsigned N = 1
) (
  input  logic [1:0]   rs1,
  output logic [N-1:0] rs1val,
  input  logic [1:0]   rs2,
  output logic [N-1:0] rs2val,
  input  logic [1:0]   rd,
  input  logic [N-1:0] rdval,
  input  logic         we,
  input  logic         rst,
  input  logic         clk
);

  logic [N-1:0] r0v, r1v, r2v, r3v;
  logic [3:0]   rd_select;

  decoder #(.N(2)) dec (.binary_in(rd), .onehot_out(rd_select));

  nbit_reg #(.N(N)) r0 (.out(r0v), .in(rdval), .wen(rd_select[0] & we), .rst(rst), .clk(clk));
  nbit_reg #(.N(N)) r1 (.out(r1v), .in(rdval), .wen(rd_select[1] & we), .rst(rst), .clk(clk));
  nbit_reg #(.N(N)) r2 (.out(r2v), .in(rdval), .wen(rd_select[2] & we), .rst(rst), .clk(clk));
  nbit_reg #(.N(N)) r3 (.out(r3v), .in(rdval), .wen(rd_select[3] & we), .rst(rst), .clk(clk));

  nbit_mux4to1 #(.N(N)) mux1 (.sel(rs1), .a(r0v), .b(r1v), .c(r2v), .d(r3v), .out(rs1val));
  nbit_mux4to1 #(.N(N)) mux2 (.sel(rs2), .a(r0v), .b(r1v), .c(r2v), .d(r3v), .out(rs2val));

endmodule
