// regfile: the MIPS integer register file, NREGS words of WIDTH bits with two
// read ports and one write port.
//
// It is the four-register construction scaled up: one nbit_reg per word, a
// decoder on rd whose one-hot output is ANDed with we to enable exactly one
// register, and one NREGS-to-1 selector per read port. Reads are
// combinational; a write lands on the next rising clock edge (a read of the
// register being written sees the old value during that cycle). rst clears
// every register. Size and port count (32 x 32 bits, 2 read + 1 write) follow
// the MIPS register-file description. Register 0 reading as constant zero
// (with writes to it dropped) when ZERO_REG0 = 1 is this design's choice,
// following the MIPS convention; the description does not say.
module regfile #(
  parameter int unsigned NREGS     = 32,
  parameter int unsigned WIDTH     = 32,
  parameter bit          ZERO_REG0 = 1'b1,
  localparam int unsigned AW       = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [AW-1:0]    rs1,
  input  logic [AW-1:0]    rs2,
  input  logic [AW-1:0]    rd,
  input  logic             we,
  input  logic [WIDTH-1:0] rdval,
  output logic [WIDTH-1:0] rs1val,
  output logic [WIDTH-1:0] rs2val
);

  logic [2**AW-1:0]  rd_select;
  logic [WIDTH-1:0]  regv [2**AW];

  decoder #(.N(AW)) dec (.binary_in(rd), .onehot_out(rd_select));

  for (genvar i = 0; i < 2**AW; i++) begin : g_reg
    if ((i == 0 && ZERO_REG0) || i >= NREGS) begin : g_const
      assign regv[i] = '0;
    end else begin : g_store
      nbit_reg #(.N(WIDTH)) r (
        .out(regv[i]), .in(rdval), .wen(rd_select[i] & we), .rst(rst), .clk(clk)
      );
    end
  end

  assign rs1val = regv[rs1];
  assign rs2val = regv[rs2];

endmodule
