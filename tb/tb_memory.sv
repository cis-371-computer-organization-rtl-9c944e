// tb_memory: random writes and reads of the default 4096 x 32 memory against
// a reference array. Only words written before are compared, since the
// memory is not initialised. Reads are checked in the same cycle as the
// address is applied (combinational read), writes one edge later.
module tb_memory;
  int checks = 0, failures = 0;
  logic clk = 0, we;
  logic [11:0] addr;
  logic [31:0] din, dout;
  logic [31:0] model [4096];
  bit          valid [4096];

  memory dut (.clk(clk), .we(we), .addr(addr), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; addr = 0; din = 0;
    for (int i = 0; i < 4096; i++) valid[i] = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // Bias addresses to a small window so reads hit written words.
      addr = (i % 3 == 0) ? 12'($urandom) : 12'($urandom_range(0, 63));
      we   = $urandom_range(0, 1) == 1;
      din  = $urandom;
      #1;
      if (valid[addr]) begin
        checks++;
        if (dout !== model[addr]) begin
          failures++; $display("FAIL read addr=%0d got %h exp %h", addr, dout, model[addr]);
        end
      end
      @(posedge clk);
      if (we) begin model[addr] = din; valid[addr] = 1; end
      #1;
      if (we) begin
        checks++;
        if (dout !== din) begin failures++; $display("FAIL after write addr=%0d got %h", addr, dout); end
      end
    end
    we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
