// tb_single_cycle_top: end-to-end test of the whole design at its default
// sizes (4096-word instruction and data memories, ROM control, 1-bit
// four-register file).
//
// The processor runs a loop summing 10..1 (backward jump, taken and
// not-taken beq, sw then lw of the result) and then random programs of all
// six instructions that end in a jump-to-self, with every retired
// instruction compared against the reference model (mips_ref_pkg) and the
// cycle count checked against the instruction count (CPI = 1). Each
// instruction kind, both beq outcomes, a write to register 0 and a negative
// immediate must each occur at least once. The four-register file beside it
// then gets random reads and writes against a reference.
module tb_single_cycle_top;
  import mips_ref_pkg::*;

  localparam int unsigned IW = 4096, DW = 4096;   // the top's defaults

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, imem_we = 0;
  logic [11:0] imem_waddr = 0;
  logic [31:0] imem_wdata = 0;

  typedef struct {
    logic valid, rf_we, dm_we;
    logic [31:0] pc, insn, rf_wdata, dm_addr, dm_wdata, next_pc;
    logic [4:0] rf_waddr;
  } tr_t;
  tr_t tr [1];

  // Four-register file side.
  logic [1:0] rf4_rs1 = 0, rf4_rs2 = 0, rf4_rd = 0;
  logic       rf4_we = 0;
  logic [0:0] rf4_rdval = 0, rf4_rs1val, rf4_rs2val;

  single_cycle_top dut (
    .clk(clk), .rst(rst), .imem_we(imem_we), .imem_waddr(imem_waddr), .imem_wdata(imem_wdata),
    .trace_valid(tr[0].valid), .trace_pc(tr[0].pc), .trace_insn(tr[0].insn),
    .trace_rf_we(tr[0].rf_we), .trace_rf_waddr(tr[0].rf_waddr), .trace_rf_wdata(tr[0].rf_wdata),
    .trace_dm_we(tr[0].dm_we), .trace_dm_addr(tr[0].dm_addr), .trace_dm_wdata(tr[0].dm_wdata),
    .trace_next_pc(tr[0].next_pc),
    .rf4_rs1(rf4_rs1), .rf4_rs2(rf4_rs2), .rf4_rd(rf4_rd), .rf4_we(rf4_we),
    .rf4_rdval(rf4_rdval), .rf4_rs1val(rf4_rs1val), .rf4_rs2val(rf4_rs2val)
  );

  always #5 clk = ~clk;

  initial begin
    #5000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  mips_ref ref_m [1];
  int n_kind [string];
  int n_taken = 0, n_not_taken = 0, n_r0 = 0, n_negimm = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Load a program while in reset, run it until it reaches its final
  // jump-to-self, and compare every cycle. Returns the last value written
  // to register 4 by processor 0 (for the directed test).
  task automatic run(input logic [31:0] prog [$], output logic [31:0] r4);
    int cycles = 0, retired = 0;
    logic [31:0] halt_pc = 32'((prog.size() - 1) * 4);
    commit_t c;
    r4 = 0;
    rst = 1;
    foreach (prog[i]) begin
      @(negedge clk); imem_we = 1; imem_waddr = 12'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0;
    @(negedge clk); rst = 0;
    foreach (ref_m[g]) ref_m[g].reset();
    forever begin
      #1;
      for (int g = 0; g < 1; g++) begin
        chk(tr[g].valid, "trace valid");
        chk(tr[g].pc === ref_m[g].pc, $sformatf("dut%0d pc %h exp %h", g, tr[g].pc, ref_m[g].pc));
        chk(tr[g].insn === prog[ref_m[g].pc >> 2], $sformatf("dut%0d insn %h", g, tr[g].insn));
        c = ref_m[g].step(prog[ref_m[g].pc >> 2], tr[g].rf_wdata);
        chk(tr[g].rf_we === c.rf_we, $sformatf("dut%0d %s rf_we %b exp %b", g, c.kind, tr[g].rf_we, c.rf_we));
        if (c.rf_we) begin
          chk(tr[g].rf_waddr === c.rf_waddr && tr[g].rf_wdata === c.rf_wdata,
              $sformatf("dut%0d %s rf write r%0d=%h exp r%0d=%h", g, c.kind,
                        tr[g].rf_waddr, tr[g].rf_wdata, c.rf_waddr, c.rf_wdata));
          if (g == 0 && c.rf_waddr == 4) r4 = c.rf_wdata;
        end
        chk(tr[g].dm_we === c.dm_we, $sformatf("dut%0d %s dm_we %b", g, c.kind, tr[g].dm_we));
        if (c.dm_we)
          chk(tr[g].dm_addr === c.dm_addr && tr[g].dm_wdata === c.dm_wdata,
              $sformatf("dut%0d sw %h<-%h exp %h<-%h", g, tr[g].dm_addr, tr[g].dm_wdata, c.dm_addr, c.dm_wdata));
        chk(tr[g].next_pc === c.next_pc, $sformatf("dut%0d %s next_pc %h exp %h", g, c.kind, tr[g].next_pc, c.next_pc));
        if (g == 0) begin
          n_kind[c.kind]++;
          if (c.kind == "beq") begin if (c.branch_taken) n_taken++; else n_not_taken++; end
          if (c.kind inside {"add", "addi", "lw"} && !c.rf_we) n_r0++;
          if (c.kind inside {"addi", "lw", "sw", "beq"} && tr[g].insn[15]) n_negimm++;
        end
      end
      retired++;
      @(posedge clk); cycles++;
      if (ref_m[0].pc == halt_pc) break;
      @(negedge clk);
    end
    // One instruction per clock: cycles elapsed equals instructions retired.
    chk(cycles == retired, $sformatf("CPI: %0d cycles for %0d instructions", cycles, retired));
    @(negedge clk);
    #1;
    chk(tr[0].pc === halt_pc, "reached halt");
  endtask

  function automatic void gen_random(ref logic [31:0] p [$], input int len);
    p = {};
    for (int i = 0; i < len - 1; i++) begin
      int k = $urandom_range(0, 9);
      int r1 = $urandom_range(0, 7), r2 = $urandom_range(0, 7), r3 = $urandom_range(0, 7);
      int imm = ($urandom_range(0, 1) != 0) ? $urandom_range(0, 40) - 20 : int'($urandom_range(0, 65535));
      int maxfwd = len - 1 - i - 1;        // words that can be skipped ahead
      case (k)
        0, 1: p.push_back(enc_add(r1, r2, r3));
        2, 3: p.push_back(enc_addi(r1, r2, imm));
        4:    p.push_back(enc_lw(r1, 4 * $urandom_range(0, 2 * DW), ($urandom_range(0, 1) != 0) ? 0 : r2));
        5, 6: p.push_back(enc_sw(r1, 4 * $urandom_range(0, 2 * DW), ($urandom_range(0, 1) != 0) ? 0 : r2));
        7, 8: p.push_back(enc_beq(r2, ($urandom_range(0, 1) != 0) ? r2 : r3, $urandom_range(0, maxfwd > 3 ? 3 : maxfwd)));
        default: p.push_back(enc_j(i + 1 + $urandom_range(0, maxfwd > 3 ? 3 : maxfwd)));
      endcase
    end
    p.push_back(enc_j(len - 1));
  endfunction

  initial begin
    logic [31:0] prog [$];
    logic [31:0] r4;
    foreach (ref_m[g]) ref_m[g] = new(DW);
    repeat (3) @(negedge clk);

    // Sum 10 + 9 + ... + 1 with a loop, store it, load it back into r4.
    prog = {enc_addi(1, 0, 10), enc_addi(2, 0, 0), enc_addi(3, 0, -1),
            enc_beq(1, 0, 3), enc_add(2, 2, 1), enc_add(1, 1, 3), enc_j(3),
            enc_sw(2, 64, 0), enc_lw(4, 64, 0), enc_j(9)};
    run(prog, r4);
    chk(r4 == 55, $sformatf("loop sum %0d exp 55", r4));

    for (int t = 0; t < 40; t++) begin
      gen_random(prog, $urandom_range(20, 200));
      run(prog, r4);
    end


    // Four-register file: random writes and reads against a reference.
    begin
      logic [0:0] m [4];
      automatic int n_rf4_w = 0;
      rst = 1; @(negedge clk); rst = 0;
      for (int i = 0; i < 4; i++) m[i] = 0;
      for (int i = 0; i < 200; i++) begin
        @(negedge clk);
        rf4_we = $urandom_range(0, 1) == 1; rf4_rd = 2'($urandom); rf4_rdval = 1'($urandom);
        rf4_rs1 = 2'($urandom); rf4_rs2 = 2'($urandom);
        #1;
        chk(rf4_rs1val === m[rf4_rs1] && rf4_rs2val === m[rf4_rs2], "rf4 read before edge");
        @(posedge clk);
        if (rf4_we) begin m[rf4_rd] = rf4_rdval; n_rf4_w++; end
        #1;
        chk(rf4_rs1val === m[rf4_rs1] && rf4_rs2val === m[rf4_rs2], "rf4 read after edge");
      end
      rf4_we = 0;
      $display("four-register file writes %0d", n_rf4_w);
      chk(n_rf4_w > 0, "rf4 written");
    end

    foreach (n_kind[k]) $display("executed %-5s %0d", k, n_kind[k]);
    $display("beq taken %0d, not taken %0d, writes to r0 %0d, negative immediates %0d",
             n_taken, n_not_taken, n_r0, n_negimm);
    chk(n_kind["add"] > 0 && n_kind["addi"] > 0 && n_kind["lw"] > 0 &&
        n_kind["sw"] > 0 && n_kind["beq"] > 0 && n_kind["j"] > 0, "all six instructions ran");
    chk(n_taken > 0, "beq taken");
    chk(n_not_taken > 0, "beq not taken");
    chk(n_r0 > 0, "write to r0 dropped");
    chk(n_negimm > 0, "negative immediate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
