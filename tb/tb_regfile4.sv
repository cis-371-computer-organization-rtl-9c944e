// tb_regfile4: random reads and writes of the four-register file at its
// default width (1 bit) and at 16 bits, against reference arrays. Checks both
// read ports before and after each write edge and the reset.
module tb_regfile4;
  int checks = 0, failures = 0;
  logic clk = 0, rst, we;
  logic [1:0]  rs1, rs2, rd;
  logic [15:0] rdval, v1, v2;
  logic [0:0]  w1, a1, b1;
  logic [15:0] model [4];

  regfile4 #(.N(16)) dut16 (.rs1(rs1), .rs1val(v1), .rs2(rs2), .rs2val(v2), .rd(rd),
                            .rdval(rdval), .we(we), .rst(rst), .clk(clk));
  regfile4           dut1  (.rs1(rs1), .rs1val(a1), .rs2(rs2), .rs2val(b1), .rd(rd),
                            .rdval(w1), .we(we), .rst(rst), .clk(clk));

  assign w1 = rdval[0];

  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check_reads();
    checks++;
    if (v1 !== model[rs1] || v2 !== model[rs2] || a1 !== model[rs1][0] || b1 !== model[rs2][0]) begin
      failures++;
      $display("FAIL rs1=%0d got %h/%b exp %h, rs2=%0d got %h/%b exp %h",
               rs1, v1, a1, model[rs1], rs2, v2, b1, model[rs2]);
    end
  endtask

  initial begin
    rst = 1; we = 0; rs1 = 0; rs2 = 0; rd = 0; rdval = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 4; i++) model[i] = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      we = $urandom_range(0, 2) != 0; rd = 2'($urandom); rdval = 16'($urandom);
      rs1 = 2'($urandom); rs2 = 2'($urandom);
      rst = (i == 500);
      #1; check_reads();
      @(posedge clk);
      if (rst) for (int k = 0; k < 4; k++) model[k] = 0;
      else if (we) model[rd] = rdval;
      #1; check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
