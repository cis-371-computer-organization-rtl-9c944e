// tb_nbit_mux4to1: every select value with random data, at the default
// 1-bit width and at 16 bits.
module tb_nbit_mux4to1;
  int checks = 0, failures = 0;
  logic [1:0] sel;
  logic [0:0]  a1, b1, c1, d1, o1;
  logic [15:0] a, b, c, d, o;

  nbit_mux4to1           dut1  (.sel(sel), .a(a1), .b(b1), .c(c1), .d(d1), .out(o1));
  nbit_mux4to1 #(.N(16)) dut16 (.sel(sel), .a(a), .b(b), .c(c), .d(d), .out(o));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] e; logic e1;
    for (int i = 0; i < 400; i++) begin
      sel = 2'(i);
      a = 16'($urandom); b = 16'($urandom); c = 16'($urandom); d = 16'($urandom);
      {a1, b1, c1, d1} = 4'($urandom);
      #1;
      case (i % 4)
        0: begin e = a; e1 = a1; end
        1: begin e = b; e1 = b1; end
        2: begin e = c; e1 = c1; end
        default: begin e = d; e1 = d1; end
      endcase
      checks++;
      if (o !== e || o1 !== e1) begin failures++; $display("FAIL sel=%0d o=%h exp %h", sel, o, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
