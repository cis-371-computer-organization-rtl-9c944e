// tb_decoder: exhaustive check of the binary-to-one-hot decoder at the
// default 2-to-4 size and at the 5-to-32 size used by the register file.
// Expected outputs are 1 << input.
module tb_decoder;
  int checks = 0, failures = 0;
  logic [1:0]  b2;  logic [3:0]  o2;
  logic [4:0]  b5;  logic [31:0] o5;

  decoder         dut2 (.binary_in(b2), .onehot_out(o2));
  decoder #(.N(5)) dut5 (.binary_in(b5), .onehot_out(o5));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      b2 = 2'(i); #1; checks++;
      if (o2 !== 4'(1 << i)) begin failures++; $display("FAIL 2-to-4 in=%0d out=%b", i, o2); end
    end
    for (int i = 0; i < 32; i++) begin
      b5 = 5'(i); #1; checks++;
      if (o5 !== 32'(1 << i)) begin failures++; $display("FAIL 5-to-32 in=%0d out=%h", i, o5); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
