// control_logic: control unit of the six-instruction MIPS datapath as random
// logic.
//
// Six instruction detectors (opcode compares, plus func = 0x20 for add) feed
// a few gates: Rwe is add|addi|lw, ALUinB is addi|lw|sw, Rdst is NOT add,
// Rwd is lw, DMwe is sw, BR and ALUop are beq, JP is j. The signal
// equations follow the random-logic control of the unit; opcode values come
// from mips_pkg. An unrecognised instruction (including an R-type with a
// function other than add) drives every enable to 0 and so acts as a no-op.
// Rdst comes out 1 for the instructions where it is a don't-care. Purely
// combinational.
module control_logic
  import mips_pkg::*;
(
  input  logic [5:0] opcode,
  input  logic [5:0] func,
  output ctrl_t      ctrl
);

  logic is_add, is_addi, is_lw, is_sw, is_beq, is_j;

  assign is_add  = (opcode == OP_RTYPE) & (func == FN_ADD);
  assign is_addi = (opcode == OP_ADDI);
  assign is_lw   = (opcode == OP_LW);
  assign is_sw   = (opcode == OP_SW);
  assign is_beq  = (opcode == OP_BEQ);
  assign is_j    = (opcode == OP_J);

  assign ctrl.br     = is_beq;
  assign ctrl.jp     = is_j;
  assign ctrl.aluinb = is_addi | is_lw | is_sw;
  assign ctrl.aluop  = is_beq;
  assign ctrl.dmwe   = is_sw;
  assign ctrl.rwe    = is_add | is_addi | is_lw;
  assign ctrl.rdst   = ~is_add;
  assign ctrl.rwd    = is_lw;

endmodule
