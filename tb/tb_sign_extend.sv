// tb_sign_extend: 16-to-32 sign extension, checked by comparing the output
// as a signed integer with the input read as a signed 16-bit value.
module tb_sign_extend;
  int checks = 0, failures = 0;
  logic [15:0] in;
  logic [31:0] out;

  sign_extend dut (.in(in), .out(out));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int v;
    for (int i = 0; i < 400; i++) begin
      case (i)
        0: in = 16'h0000; 1: in = 16'h7FFF; 2: in = 16'h8000; 3: in = 16'hFFFF;
        default: in = 16'($urandom);
      endcase
      #1;
      v = (in >= 16'h8000) ? int'(in) - 65536 : int'(in);
      checks++;
      if ($signed(out) != v) begin failures++; $display("FAIL in=%h out=%h", in, out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
