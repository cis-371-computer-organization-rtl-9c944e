// decoder: binary to one-hot decoder, N inputs to 2**N outputs.
//
// Output bit J is 1 exactly when the binary input equals J; every other bit
// is 0. Each output is an equality compare of the input against a constant,
// which reduces to an AND of the input bits with inverters on the bits that
// are 0 in the constant. Purely combinational. The default N = 2 gives the
// 2-to-4 decoder used for the write port of the 4-entry register file; the
// 32-entry register file uses N = 5.
module decoder #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0]      binary_in,
  output logic [2**N-1:0]   onehot_out
);

  always_comb begin
    for (int unsigned j = 0; j < 2**N; j++) begin
      onehot_out[j] = (binary_in == N'(j));
    end
  end

endmodule
