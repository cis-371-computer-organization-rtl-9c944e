// tb_adder: corner cases (carry out dropped) and random operands of the
// 32-bit adder, against a 64-bit sum cut to 32 bits.
module tb_adder;
  int checks = 0, failures = 0;
  logic [31:0] a, b, s;

  adder dut (.a(a), .b(b), .sum(s));

  task automatic chk(input logic [31:0] x, input logic [31:0] y);
    logic [63:0] full;
    a = x; b = y; #1;
    full = {32'd0, x} + {32'd0, y};
    checks++;
    if (s !== full[31:0]) begin failures++; $display("FAIL %h + %h = %h", x, y, s); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    chk(32'hFFFF_FFFF, 32'd1);
    chk(32'h0000_0000, 32'd4);
    chk(32'h7FFF_FFFF, 32'd1);
    chk(32'h8000_0000, 32'h8000_0000);
    for (int i = 0; i < 300; i++) chk($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
