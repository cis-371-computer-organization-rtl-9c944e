// mips_pkg: types and constants shared by the six-instruction MIPS single-cycle
// processor.
//
// It holds the opcode and function-code values of the six supported
// instructions (add, addi, lw, sw, beq, j) and the packed struct of the eight
// control signals that steer the datapath. The list of control signals and
// their meaning follow the unit's control tables. The opcode values are the
// standard MIPS encodings, chosen by this design so that real MIPS machine
// code runs unchanged.
package mips_pkg;

  // Opcode (insn[31:26]) and function code (insn[5:0]) values.
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] FN_ADD   = 6'h20;
  localparam logic [5:0] OP_ADDI  = 6'h08;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2B;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_J     = 6'h02;

  // Control word, fields in the column order of the control ROM table.
  //   br     : instruction is a branch (PC takes the branch target when ALU z=1)
  //   jp     : instruction is a jump (PC takes the jump target)
  //   aluinb : ALU second input is the sign-extended immediate (1) or rt value (0)
  //   aluop  : 0 = add, 1 = subtract (compare for beq)
  //   dmwe   : data memory write enable
  //   rwe    : register file write enable
  //   rdst   : destination register is rt (1) or rd (0)
  //   rwd    : register write data is data memory output (1) or ALU result (0)
  typedef struct packed {
    logic br;
    logic jp;
    logic aluinb;
    logic aluop;
    logic dmwe;
    logic rwe;
    logic rdst;
    logic rwd;
  } ctrl_t;

endpackage
