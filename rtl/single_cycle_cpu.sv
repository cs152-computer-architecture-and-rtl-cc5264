// Single-cycle processor for a MIPS subset: add, sub, ori, lw, sw, beq, j.
//
// The main control decodes Instruction<31:26> into the datapath control
// lines and a 3-bit ALUop; the local ALU control turns ALUop and
// Instruction<5:0> into ALUctr; the datapath executes the instruction in
// one clock cycle. R-type instructions may also use the func codes for and,
// or and set-on-less-than, which the ALU control decodes.
//
// Interface: clk, with all state updated at its falling edge; rst,
// asynchronous and active high, which sets the PC to RESET_PC and blocks
// register and memory writes; imem_*, a port that writes the instruction
// memory (use it while rst is high); dbg_*, the PC, the current instruction
// and the register and data memory write each instruction makes.
// Timing: one instruction per cycle, CPI = 1; the cycle must cover the
// slowest path, the load: PC clock-to-Q, instruction memory, register file,
// ALU, data memory and register setup.
module single_cycle_cpu #(
  parameter int unsigned IMEM_WORDS = 2048,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        imem_we,
  input  logic [29:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  output logic [31:0] dbg_pc,
  output logic [31:0] dbg_instr,
  output logic        dbg_reg_we,
  output logic [4:0]  dbg_reg_waddr,
  output logic [31:0] dbg_reg_wdata,
  output logic        dbg_mem_we,
  output logic [31:0] dbg_mem_addr,
  output logic [31:0] dbg_mem_wdata
);

  import mips_pkg::*;

  ctrl_t       ctrl;
  logic [2:0]  alu_ctr;
  logic [31:0] instr;

  main_control u_main_ctrl (
    .op   (instr[31:26]),
    .ctrl (ctrl)
  );

  alu_control u_alu_ctrl (
    .alu_op  (ctrl.alu_op),
    .func    (instr[5:0]),
    .alu_ctr (alu_ctr)
  );

  datapath #(
    .IMEM_WORDS (IMEM_WORDS),
    .DMEM_WORDS (DMEM_WORDS),
    .RESET_PC   (RESET_PC)
  ) u_dp (
    .clk           (clk),
    .rst           (rst),
    .ctrl          (ctrl),
    .alu_ctr       (alu_ctr),
    .instr         (instr),
    .imem_we       (imem_we),
    .imem_waddr    (imem_waddr),
    .imem_wdata    (imem_wdata),
    .dbg_pc        (dbg_pc),
    .dbg_reg_we    (dbg_reg_we),
    .dbg_reg_waddr (dbg_reg_waddr),
    .dbg_reg_wdata (dbg_reg_wdata),
    .dbg_mem_we    (dbg_mem_we),
    .dbg_mem_addr  (dbg_mem_addr),
    .dbg_mem_wdata (dbg_mem_wdata)
  );

  assign dbg_instr = instr;

endmodule
