// tb_alu: add (ALUop = 0) and subtract (ALUop = 1) on random and equal
// operands, checking the result and the zero flag used by beq.
module tb_alu;
  int checks = 0, failures = 0;
  logic [31:0] a, b, r;
  logic op, z;

  alu dut (.a(a), .b(b), .aluop(op), .result(r), .zero(z));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint e;
    for (int i = 0; i < 600; i++) begin
      a = $urandom; b = (i % 5 == 0) ? a : $urandom;
      if (i % 7 == 0) b = -a;
      op = i[0]; #1;
      e = op ? (longint'(a) - longint'(b)) : (longint'(a) + longint'(b));
      checks++;
      if (r !== e[31:0]) begin failures++; $display("FAIL op=%b a=%h b=%h r=%h", op, a, b, r); end
      checks++;
      if (z !== (e[31:0] == 0)) begin failures++; $display("FAIL zero op=%b a=%h b=%h z=%b", op, a, b, z); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
