// tb_mux2: random data through both select values of the 32-bit 2-to-1 mux.
module tb_mux2;
  int checks = 0, failures = 0;
  logic sel;
  logic [31:0] in0, in1, out;

  mux2 dut (.sel(sel), .in0(in0), .in1(in1), .out(out));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      sel = i[0]; in0 = $urandom; in1 = $urandom; #1;
      checks++;
      if (out !== (i[0] ? in1 : in0)) begin failures++; $display("FAIL sel=%b out=%h", sel, out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
