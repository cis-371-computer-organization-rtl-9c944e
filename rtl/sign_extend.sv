// sign_extend: the SX unit, widening an IN_W-bit two's-complement immediate
// to OUT_W bits by replicating its top bit.
//
// Purely combinational, built from wire concatenation. Defaults are the
// 16-bit immediate of I-type instructions and the 32-bit datapath.
module sign_extend #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 32
) (
  input  logic [IN_W-1:0]  in,
  output logic [OUT_W-1:0] out
);

  assign out = {{(OUT_W-IN_W){in[IN_W-1]}}, in};

endmodule
