// nbit_reg: N-bit register with write enable and synchronous reset.
//
// On a rising clock edge the register clears to 0 when rst is high,
// otherwise loads `in` when wen is high and holds its value when wen is low.
// `out` shows the stored value. The port list (out, in, wen, rst, clk) and the
// default width of 1 follow the register building block of the register-file
// construction; the reset value of 0 and the synchronous, active-high reset
// are this design's choices.
module nbit_reg #(
  parameter int unsigned N = 1
) (
  output logic [N-1:0] out,
  input  logic [N-1:0] in,
  input  logic         wen,
  input  logic         rst,
  input  logic         clk
);

  always_ff @(posedge clk) begin
    if (rst)      out <= '0;
    else if (wen) out <= in;
  end

endmodule
