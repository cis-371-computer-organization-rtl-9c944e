// shift_left2: the "<<2" unit, a left shift by two done by wire concatenation.
//
// out = {in, 2'b00}, zero-filled at the top when OUT_W > IN_W+2 and cut to
// the low OUT_W bits otherwise. Purely combinational. The datapath uses it
// twice: with IN_W = 32 on the sign-extended branch offset (word offset to
// byte offset), and with IN_W = 26 on the jump immediate, giving
// {4'b0000, imm26, 2'b00} as the jump target.
module shift_left2 #(
  parameter int unsigned IN_W  = 32,
  parameter int unsigned OUT_W = 32
) (
  input  logic [IN_W-1:0]  in,
  output logic [OUT_W-1:0] out
);

  localparam int unsigned EXT_W = (IN_W + 2 > OUT_W) ? IN_W + 2 : OUT_W;

  logic [EXT_W-1:0] ext;
  assign ext = EXT_W'({in, 2'b00});
  assign out = ext[OUT_W-1:0];

endmodule
