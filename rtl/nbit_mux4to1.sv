// nbit_mux4to1: N-bit 4-to-1 multiplexer.
//
// out = a, b, c or d when sel is 0, 1, 2 or 3. Purely combinational. The
// port order (sel, a, b, c, d, out) and the default width of 1 follow the
// mux building block of the register-file construction, where one of these
// forms each read port.
module nbit_mux4to1 #(
  parameter int unsigned N = 1
) (
  input  logic [1:0]   sel,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  input  logic [N-1:0] d,
  output logic [N-1:0] out
);

  always_comb begin
    unique case (sel)
      2'd0: out = a;
      2'd1: out = b;
      2'd2: out = c;
      default: out = d;
    endcase
  end

endmodule
