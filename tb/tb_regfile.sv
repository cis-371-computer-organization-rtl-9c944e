// tb_regfile: random reads and writes of the 32 x 32 register file against a
// reference array. Checks both read ports every cycle, that a write shows
// only after the clock edge, that reset clears every register, and that
// register 0 always reads as zero.
module tb_regfile;
  int checks = 0, failures = 0;
  logic clk = 0, rst, we;
  logic [4:0]  rs1, rs2, rd;
  logic [31:0] rdval, v1, v2;
  logic [31:0] model [32];

  regfile dut (.clk(clk), .rst(rst), .rs1(rs1), .rs2(rs2), .rd(rd), .we(we),
               .rdval(rdval), .rs1val(v1), .rs2val(v2));

  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check_reads();
    checks++;
    if (v1 !== model[rs1] || v2 !== model[rs2]) begin
      failures++;
      $display("FAIL rs1=%0d got %h exp %h, rs2=%0d got %h exp %h", rs1, v1, model[rs1], rs2, v2, model[rs2]);
    end
  endtask

  initial begin
    rst = 1; we = 0; rs1 = 0; rs2 = 0; rd = 0; rdval = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 32; i++) model[i] = 0;
    for (int i = 0; i < 32; i++) begin       // reset cleared all
      rs1 = 5'(i); rs2 = 5'(31 - i); #1; check_reads();
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = $urandom_range(0, 3) != 0; rd = 5'($urandom); rdval = $urandom;
      rs1 = (i % 4 == 0) ? rd : 5'($urandom); rs2 = 5'($urandom);
      rst = (i == 1000);
      #1; check_reads();                     // old value before the edge
      @(posedge clk);
      if (rst) for (int k = 0; k < 32; k++) model[k] = 0;
      else if (we && rd != 0) model[rd] = rdval;
      #1; check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
