// tb_nbit_reg: random stimulus on a 1-bit (default) and a 16-bit register,
// compared each cycle with a reference of reset-to-0 / load-on-wen / hold.
module tb_nbit_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst, wen;
  logic [0:0]  in1, out1, ref1;
  logic [15:0] in16, out16, ref16;

  nbit_reg           dut1  (.out(out1),  .in(in1),  .wen(wen), .rst(rst), .clk(clk));
  nbit_reg #(.N(16)) dut16 (.out(out16), .in(in16), .wen(wen), .rst(rst), .clk(clk));

  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; wen = 0; in1 = 0; in16 = 0;
    @(posedge clk); #1;
    ref1 = 0; ref16 = 0;
    for (int i = 0; i < 500; i++) begin
      rst  = ($urandom_range(0, 15) == 0);
      wen  = $urandom_range(0, 1) == 1;
      in1  = 1'($urandom);
      in16 = 16'($urandom);
      @(posedge clk);
      if (rst) begin ref1 = 0; ref16 = 0; end
      else if (wen) begin ref1 = in1; ref16 = in16; end
      #1;
      checks++;
      if (out1 !== ref1 || out16 !== ref16) begin
        failures++;
        $display("FAIL cycle %0d: out1=%b exp %b out16=%h exp %h", i, out1, ref1, out16, ref16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
