// single_cycle_top: top level holding the two designs of the single-cycle
// datapath unit side by side.
//
//  * cpu: the six-instruction MIPS single-cycle processor (mips_single_cycle),
//    with its instruction-memory load port and commit trace brought out.
//  * rf4: the stand-alone four-entry register file (regfile4) built from
//    nbit_reg, decoder and nbit_mux4to1, with its own ports (rf4_*). It has
//    no connection to the processor, which uses the 32-entry regfile.
// Both share clk and rst. Timing is that of each block: the processor
// retires one instruction per rising edge; rf4 reads combinationally and
// writes on the rising edge.
module single_cycle_top #(
  parameter int unsigned IMEM_WORDS      = 4096,
  parameter int unsigned DMEM_WORDS      = 4096,
  parameter bit          USE_ROM_CONTROL = 1'b1,
  parameter int unsigned RF4_N           = 1,
  localparam int unsigned IAW            = $clog2(IMEM_WORDS)
) (
  input  logic             clk,
  input  logic             rst,
  // processor: instruction memory load port
  input  logic             imem_we,
  input  logic [IAW-1:0]   imem_waddr,
  input  logic [31:0]      imem_wdata,
  // processor: commit trace
  output logic             trace_valid,
  output logic [31:0]      trace_pc,
  output logic [31:0]      trace_insn,
  output logic             trace_rf_we,
  output logic [4:0]       trace_rf_waddr,
  output logic [31:0]      trace_rf_wdata,
  output logic             trace_dm_we,
  output logic [31:0]      trace_dm_addr,
  output logic [31:0]      trace_dm_wdata,
  output logic [31:0]      trace_next_pc,
  // four-register file
  input  logic [1:0]       rf4_rs1,
  input  logic [1:0]       rf4_rs2,
  input  logic [1:0]       rf4_rd,
  input  logic             rf4_we,
  input  logic [RF4_N-1:0] rf4_rdval,
  output logic [RF4_N-1:0] rf4_rs1val,
  output logic [RF4_N-1:0] rf4_rs2val
);

  mips_single_cycle #(
    .IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS), .USE_ROM_CONTROL(USE_ROM_CONTROL)
  ) cpu (
    .clk(clk), .rst(rst),
    .imem_we(imem_we), .imem_waddr(imem_waddr), .imem_wdata(imem_wdata),
    .trace_valid(trace_valid), .trace_pc(trace_pc), .trace_insn(trace_insn),
    .trace_rf_we(trace_rf_we), .trace_rf_waddr(trace_rf_waddr), .trace_rf_wdata(trace_rf_wdata),
    .trace_dm_we(trace_dm_we), .trace_dm_addr(trace_dm_addr), .trace_dm_wdata(trace_dm_wdata),
    .trace_next_pc(trace_next_pc)
  );

  regfile4 #(.N(RF4_N)) rf4 (
    .rs1(rf4_rs1), .rs1val(rf4_rs1val), .rs2(rf4_rs2), .rs2val(rf4_rs2val),
    .rd(rf4_rd), .rdval(rf4_rdval), .we(rf4_we), .rst(rst), .clk(clk)
  );

endmodule
