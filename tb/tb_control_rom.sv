// tb_control_rom: all 64 opcodes. The six instructions must give their rows
// of the control table (don't-care fields not compared); every other opcode
// must give an all-zero control word.
module tb_control_rom;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic [5:0] opcode;
  ctrl_t ctrl;

  control_rom dut (.opcode(opcode), .ctrl(ctrl));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // Expected rows: BR JP ALUinB ALUop DMwe Rwe Rdst Rwd, and a care mask.
    logic [7:0] exp, mask;
    for (int op = 0; op < 64; op++) begin
      opcode = 6'(op); #1;
      mask = 8'hFF;
      case (op)
        'h00: exp = 8'b0000_0100;                   // add
        'h08: exp = 8'b0010_0110;                   // addi
        'h23: exp = 8'b0010_0111;                   // lw
        'h2B: begin exp = 8'b0010_1000; mask = 8'b1111_1100; end // sw
        'h04: begin exp = 8'b1001_0000; mask = 8'b1111_1100; end // beq
        'h02: begin exp = 8'b0100_0000; mask = 8'b1111_1100; end // j
        default: exp = 8'b0000_0000;
      endcase
      checks++;
      if ((ctrl & mask) !== (exp & mask)) begin
        failures++; $display("FAIL opcode %h: ctrl=%b exp=%b", op, ctrl, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
