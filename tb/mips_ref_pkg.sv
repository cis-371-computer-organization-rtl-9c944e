// mips_ref_pkg: instruction-level reference model and assembler helpers for
// the testbenches of the six-instruction MIPS processor.
//
// mips_ref executes one instruction at a time on its own register and memory
// state and returns what the processor must show for it: its register write,
// data-memory write and next PC. Data memory is word addressed and wraps at
// DMEM_WORDS, like the processor. Memory words that were never written hold
// an unknown value; the first load of such a word takes the value the
// processor returned, and later loads must agree with it. The enc_*
// functions build machine words in the standard MIPS formats.
package mips_ref_pkg;

  typedef struct {
    logic        rf_we;
    logic [4:0]  rf_waddr;
    logic [31:0] rf_wdata;
    logic        dm_we;
    logic [31:0] dm_addr;
    logic [31:0] dm_wdata;
    logic [31:0] next_pc;
    bit          branch_taken;
    string       kind;
  } commit_t;

  function automatic logic [31:0] enc_add(int rd, int rs, int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h20};
  endfunction
  function automatic logic [31:0] enc_addi(int rt, int rs, int imm);
    return {6'h08, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] enc_lw(int rt, int imm, int rs);
    return {6'h23, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] enc_sw(int rt, int imm, int rs);
    return {6'h2B, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] enc_beq(int rs, int rt, int off);
    return {6'h04, 5'(rs), 5'(rt), 16'(off)};
  endfunction
  function automatic logic [31:0] enc_j(int word_index);
    return {6'h02, 26'(word_index)};
  endfunction

  class mips_ref;
    int unsigned       dmem_words;
    logic [31:0]       regs [32];
    logic [31:0]       mem  [int unsigned];
    logic [31:0]       pc;

    function new(int unsigned dmem_words_i);
      dmem_words = dmem_words_i;
      reset();
    endfunction

    // Processor reset: PC and registers to zero. Memory keeps its contents.
    function void reset();
      pc = 0;
      foreach (regs[i]) regs[i] = 0;
    endfunction

    function commit_t step(input logic [31:0] insn, input logic [31:0] dut_load);
      commit_t c;
      logic [5:0]  op   = insn[31:26];
      logic [5:0]  fn   = insn[5:0];
      int          rs   = int'(insn[25:21]);
      int          rt   = int'(insn[20:16]);
      int          rd   = int'(insn[15:11]);
      logic [31:0] sx   = {{16{insn[15]}}, insn[15:0]};
      logic [31:0] pc4  = pc + 4;
      logic [31:0] addr;
      int unsigned w;
      c.rf_we = 0; c.rf_waddr = 0; c.rf_wdata = 0;
      c.dm_we = 0; c.dm_addr = 0; c.dm_wdata = 0;
      c.next_pc = pc4; c.branch_taken = 0; c.kind = "nop";
      if (op == 6'h00 && fn == 6'h20) begin
        c.kind = "add"; c.rf_we = 1; c.rf_waddr = 5'(rd); c.rf_wdata = regs[rs] + regs[rt];
      end else if (op == 6'h08) begin
        c.kind = "addi"; c.rf_we = 1; c.rf_waddr = 5'(rt); c.rf_wdata = regs[rs] + sx;
      end else if (op == 6'h23) begin
        c.kind = "lw"; addr = regs[rs] + sx; w = (addr >> 2) % dmem_words;
        if (!mem.exists(w)) mem[w] = dut_load;
        c.rf_we = 1; c.rf_waddr = 5'(rt); c.rf_wdata = mem[w];
      end else if (op == 6'h2B) begin
        c.kind = "sw"; addr = regs[rs] + sx; w = (addr >> 2) % dmem_words;
        c.dm_we = 1; c.dm_addr = addr; c.dm_wdata = regs[rt]; mem[w] = regs[rt];
      end else if (op == 6'h04) begin
        c.kind = "beq";
        if (regs[rs] == regs[rt]) begin c.next_pc = pc4 + (sx << 2); c.branch_taken = 1; end
      end else if (op == 6'h02) begin
        c.kind = "j"; c.next_pc = {4'b0000, insn[25:0], 2'b00};
      end
      if (c.rf_we && c.rf_waddr == 0) c.rf_we = 0;    // register 0 stays zero
      if (c.rf_we) regs[c.rf_waddr] = c.rf_wdata;
      pc = c.next_pc;
      return c;
    endfunction
  endclass

endpackage
