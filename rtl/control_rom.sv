// control_rom: control unit of the six-instruction MIPS datapath as a ROM.
//
// A 64-line table indexed by the opcode; each line is one control word
// (BR, JP, ALUinB, ALUop, DMwe, Rwe, Rdst, Rwd). The lines for add, addi,
// lw, sw, beq and j hold the control table of the unit; every other line is
// all zeros, which makes an unknown opcode a no-op that falls through to
// PC+4. Don't-care entries (Rdst and Rwd of sw, beq and j) are stored as 0.
// Opcode 0 is add whatever the function field holds, since the ROM sees only
// the opcode. Purely combinational.
module control_rom
  import mips_pkg::*;
(
  input  logic [5:0] opcode,
  output ctrl_t      ctrl
);

  function automatic ctrl_t [63:0] build_rom();
    ctrl_t [63:0] t;
    t = '0;
    //                br    jp    aluinb aluop dmwe  rwe   rdst  rwd
    t[OP_RTYPE] = '{1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0}; // add
    t[OP_ADDI]  = '{1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 1'b1, 1'b1, 1'b0}; // addi
    t[OP_LW]    = '{1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 1'b1, 1'b1, 1'b1}; // lw
    t[OP_SW]    = '{1'b0, 1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 1'b0, 1'b0}; // sw
    t[OP_BEQ]   = '{1'b1, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0}; // beq
    t[OP_J]     = '{1'b0, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0}; // j
    return t;
  endfunction

  localparam ctrl_t [63:0] ROM = build_rom();

  assign ctrl = ROM[opcode];

endmodule
