// tb_shift_left2: the branch-offset configuration (32 -> 32, a multiply by
// four modulo 2**32) and the jump-target configuration (26 -> 32, giving
// 4'b0000, imm26, 2'b00).
module tb_shift_left2;
  int checks = 0, failures = 0;
  logic [31:0] bin, bout, jout;
  logic [25:0] jin;

  shift_left2                         dut_b (.in(bin), .out(bout));
  shift_left2 #(.IN_W(26), .OUT_W(32)) dut_j (.in(jin), .out(jout));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      bin = $urandom; jin = 26'($urandom); #1;
      checks++;
      if (bout !== 32'(bin * 4)) begin failures++; $display("FAIL b in=%h out=%h", bin, bout); end
      checks++;
      if (jout !== 32'(jin) * 4 || jout[31:28] !== 4'b0000) begin
        failures++; $display("FAIL j in=%h out=%h", jin, jout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
