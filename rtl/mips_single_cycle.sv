// mips_single_cycle: single-cycle MIPS datapath and control for six
// instructions: add, addi, lw, sw, beq and j.
//
// Every instruction is fetched, decoded, executed and retired in one clock
// cycle (CPI = 1); the cycle time is set by the longest path, fetch -> decode
// -> register read -> ALU -> data memory -> register write. The datapath:
//   PC (a 32-bit nbit_reg) addresses the instruction memory; an adder forms
//   PC+4. The rs and rt fields read the register file. The Rdst mux picks rd
//   (R-type) or rt (I-type) as the destination. The SX unit sign-extends the
//   16-bit immediate and the ALUinB mux picks rt's value or that immediate as
//   the second ALU input. The ALU result addresses the data memory, whose
//   write data is rt's value; the Rwd mux writes back the ALU result or the
//   loaded word. For beq the ALU subtracts and its z output, ANDed with BR,
//   selects PC+4 + (SX(imm16) << 2). For j the JP mux selects
//   {4'b0000, imm26, 2'b00}.
// The control unit is either the ROM (USE_ROM_CONTROL = 1) or the random
// logic version; both are built, and for the six instructions an assertion
// checks that they agree on every signal that is not a don't-care.
//
// Interface: rst (synchronous, active high) clears the PC and the register
// file and blocks all writes by the instruction being shown. While rst is
// high the instruction memory can be loaded through imem_we/imem_waddr/
// imem_wdata (word address); the port is shared with fetch, as memories have
// one shared read/write port. The trace_* outputs describe the instruction
// retiring at the next rising edge: its PC and word, its register write, its
// data-memory write (byte address) and the next PC; trace_valid is low during
// reset.
//
// Follows the unit's datapath and control tables. This design's choices:
// standard MIPS opcodes, memory sizes, word addressing that ignores address
// bits [1:0] and bits above the memory size, register 0 reading as zero,
// ALUop = 1 meaning subtract, and the load port.
module mips_single_cycle
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS      = 4096,
  parameter int unsigned DMEM_WORDS      = 4096,
  parameter bit          USE_ROM_CONTROL = 1'b1,
  localparam int unsigned IAW            = $clog2(IMEM_WORDS),
  localparam int unsigned DAW            = $clog2(DMEM_WORDS)
) (
  input  logic            clk,
  input  logic            rst,
  // instruction memory load port (used while rst is high)
  input  logic            imem_we,
  input  logic [IAW-1:0]  imem_waddr,
  input  logic [31:0]     imem_wdata,
  // commit trace
  output logic            trace_valid,
  output logic [31:0]     trace_pc,
  output logic [31:0]     trace_insn,
  output logic            trace_rf_we,
  output logic [4:0]      trace_rf_waddr,
  output logic [31:0]     trace_rf_wdata,
  output logic            trace_dm_we,
  output logic [31:0]     trace_dm_addr,
  output logic [31:0]     trace_dm_wdata,
  output logic [31:0]     trace_next_pc
);

  // ---------------------------------------------------------------- fetch
  logic [31:0] pc, pc_next, pc_plus4, insn;
  logic [IAW-1:0] imem_addr;

  nbit_reg #(.N(32)) pc_reg (.out(pc), .in(pc_next), .wen(1'b1), .rst(rst), .clk(clk));

  assign imem_addr = (rst && imem_we) ? imem_waddr : pc[IAW+1:2];

  memory #(.WORDS(IMEM_WORDS), .WIDTH(32)) imem (
    .clk(clk), .we(rst && imem_we), .addr(imem_addr), .din(imem_wdata), .dout(insn)
  );

  adder #(.WIDTH(32)) pc_inc (.a(pc), .b(32'd4), .sum(pc_plus4));

  // --------------------------------------------------------------- decode
  // Fields by wire select: op[31:26] rs[25:21] rt[20:16] rd[15:11] sh[10:6]
  // func[5:0] (R-type), imm16[15:0] (I-type), imm26[25:0] (J-type).
  logic [5:0]  opcode, func;
  logic [4:0]  rs, rt, rd, wreg;
  logic [15:0] imm16;
  logic [25:0] imm26;

  assign opcode = insn[31:26];
  assign rs     = insn[25:21];
  assign rt     = insn[20:16];
  assign rd     = insn[15:11];
  assign func   = insn[5:0];
  assign imm16  = insn[15:0];
  assign imm26  = insn[25:0];

  ctrl_t ctrl, ctrl_rom, ctrl_logic;

  control_rom   u_ctrl_rom   (.opcode(opcode), .ctrl(ctrl_rom));
  control_logic u_ctrl_logic (.opcode(opcode), .func(func), .ctrl(ctrl_logic));

  assign ctrl = USE_ROM_CONTROL ? ctrl_rom : ctrl_logic;

  // The two control implementations must agree on all cared-for signals.
  always_comb begin
    if (!rst && ((opcode == OP_RTYPE && func == FN_ADD) || opcode == OP_ADDI ||
                 opcode == OP_LW || opcode == OP_SW || opcode == OP_BEQ || opcode == OP_J)) begin
      a_ctrl_agree: assert ({ctrl_rom.br, ctrl_rom.jp, ctrl_rom.aluinb, ctrl_rom.aluop,
                             ctrl_rom.dmwe, ctrl_rom.rwe} ==
                            {ctrl_logic.br, ctrl_logic.jp, ctrl_logic.aluinb, ctrl_logic.aluop,
                             ctrl_logic.dmwe, ctrl_logic.rwe} &&
                            (!ctrl_rom.rwe || (ctrl_rom.rdst == ctrl_logic.rdst &&
                                               ctrl_rom.rwd == ctrl_logic.rwd)));
    end
  end

  // ------------------------------------------------------- register file
  logic [31:0] rs_val, rt_val, wdata;
  logic        rf_we;

  mux2 #(.WIDTH(5)) rdst_mux (.sel(ctrl.rdst), .in0(rd), .in1(rt), .out(wreg));

  assign rf_we = ctrl.rwe & ~rst;

  regfile #(.NREGS(32), .WIDTH(32)) rf (
    .clk(clk), .rst(rst), .rs1(rs), .rs2(rt), .rd(wreg), .we(rf_we),
    .rdval(wdata), .rs1val(rs_val), .rs2val(rt_val)
  );

  // -------------------------------------------------------------- execute
  logic [31:0] sximm, alu_b, alu_out;
  logic        alu_z;

  sign_extend #(.IN_W(16), .OUT_W(32)) sx (.in(imm16), .out(sximm));

  mux2 #(.WIDTH(32)) aluinb_mux (.sel(ctrl.aluinb), .in0(rt_val), .in1(sximm), .out(alu_b));

  alu #(.WIDTH(32)) u_alu (.a(rs_val), .b(alu_b), .aluop(ctrl.aluop), .result(alu_out), .zero(alu_z));

  // --------------------------------------------------------------- memory
  logic [31:0] dm_out;
  logic        dm_we;

  assign dm_we = ctrl.dmwe & ~rst;

  memory #(.WORDS(DMEM_WORDS), .WIDTH(32)) dmem (
    .clk(clk), .we(dm_we), .addr(alu_out[DAW+1:2]), .din(rt_val), .dout(dm_out)
  );

  mux2 #(.WIDTH(32)) rwd_mux (.sel(ctrl.rwd), .in0(alu_out), .in1(dm_out), .out(wdata));

  // -------------------------------------------------------------- next PC
  logic [31:0] br_off, br_target, pc_br, j_target;

  shift_left2 #(.IN_W(32), .OUT_W(32)) br_shift (.in(sximm), .out(br_off));
  adder       #(.WIDTH(32))            br_add   (.a(pc_plus4), .b(br_off), .sum(br_target));
  mux2        #(.WIDTH(32))            br_mux   (.sel(ctrl.br & alu_z), .in0(pc_plus4),
                                                 .in1(br_target), .out(pc_br));
  shift_left2 #(.IN_W(26), .OUT_W(32)) j_shift  (.in(imm26), .out(j_target));
  mux2        #(.WIDTH(32))            jp_mux   (.sel(ctrl.jp), .in0(pc_br), .in1(j_target),
                                                 .out(pc_next));

  // ---------------------------------------------------------------- trace
  assign trace_valid    = ~rst;
  assign trace_pc       = pc;
  assign trace_insn     = insn;
  assign trace_rf_we    = rf_we && (wreg != 5'd0);
  assign trace_rf_waddr = wreg;
  assign trace_rf_wdata = wdata;
  assign trace_dm_we    = dm_we;
  assign trace_dm_addr  = alu_out;
  assign trace_dm_wdata = rt_val;
  assign trace_next_pc  = pc_next;

endmodule
