// tb_control_logic: every opcode with every function code. The six
// instructions must give their rows of the control table (don't-care fields
// not compared); anything else (including R-type with a function other than
// add) must leave every write enable, BR and JP at 0.
module tb_control_logic;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic [5:0] opcode, func;
  ctrl_t ctrl;

  control_logic dut (.opcode(opcode), .func(func), .ctrl(ctrl));

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] exp, mask;
    for (int op = 0; op < 64; op++) begin
      for (int fn = 0; fn < 64; fn++) begin
        opcode = 6'(op); func = 6'(fn); #1;
        mask = 8'hFF;
        if (op == 'h00 && fn == 'h20)  exp = 8'b0000_0100;                            // add
        else if (op == 'h08)           exp = 8'b0010_0110;                            // addi
        else if (op == 'h23)           exp = 8'b0010_0111;                            // lw
        else if (op == 'h2B) begin     exp = 8'b0010_1000; mask = 8'b1111_1100; end   // sw
        else if (op == 'h04) begin     exp = 8'b1001_0000; mask = 8'b1111_1100; end   // beq
        else if (op == 'h02) begin     exp = 8'b0100_0000; mask = 8'b1111_1100; end   // j
        else begin                     exp = 8'b0000_0000; mask = 8'b1100_1100; end   // no-op
        checks++;
        if ((ctrl & mask) !== (exp & mask)) begin
          failures++; $display("FAIL op %h func %h: ctrl=%b exp=%b", op, fn, ctrl, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
