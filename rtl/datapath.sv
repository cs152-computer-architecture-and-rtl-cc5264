// Single-cycle datapath.
//
// Every instruction passes through all of it in one clock cycle:
//   fetch     the instruction fetch unit presents Instruction<31:0>;
//   decode    Rs = <25:21> and Rt = <20:16> address the register file,
//             Rd = <15:11>, imm16 = <15:0>;
//   execute   the ALU combines busA with busB (ALUSrc = 0) or with the
//             extended imm16 (ALUSrc = 1), as ALUctr says;
//   memory    the ALU result addresses the data memory; busB is its Data In
//             and MemWr writes it;
//   write     busW is the ALU result (MemtoReg = 0) or the data memory
//             output (MemtoReg = 1), written to Rd (RegDst = 1) or Rt
//             (RegDst = 0) when RegWr is 1.
// Zero from the ALU goes back to the fetch unit for beq. All state (PC,
// registers, data memory) changes together at the falling clock edge, so
// a loaded value is visible to the next instruction.
//
// Control comes in as a ctrl_t bundle plus ALUctr. The dbg_* outputs show
// the writes each instruction makes; they and the instruction memory load
// port are this design's additions for loading and observing programs.
module datapath
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 2048,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  ctrl_t       ctrl,
  input  logic [2:0]  alu_ctr,
  output logic [31:0] instr,
  // program load
  input  logic        imem_we,
  input  logic [29:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  // observation
  output logic [31:0] dbg_pc,
  output logic        dbg_reg_we,
  output logic [4:0]  dbg_reg_waddr,
  output logic [31:0] dbg_reg_wdata,
  output logic        dbg_mem_we,
  output logic [31:0] dbg_mem_addr,
  output logic [31:0] dbg_mem_wdata
);

  logic [4:0]  rs, rt, rd, rw;
  logic [15:0] imm16;
  logic [31:0] bus_a, bus_b, bus_w;
  logic [31:0] imm_ext, alu_b, alu_out, mem_out;
  logic        zero;

  instruction_fetch_unit #(
    .IMEM_WORDS (IMEM_WORDS),
    .RESET_PC   (RESET_PC)
  ) u_ifu (
    .clk        (clk),
    .rst        (rst),
    .branch     (ctrl.branch),
    .jump       (ctrl.jump),
    .zero       (zero),
    .instr      (instr),
    .pc         (dbg_pc),
    .imem_we    (imem_we),
    .imem_waddr (imem_waddr),
    .imem_wdata (imem_wdata)
  );

  always_comb begin
    rs    = instr[25:21];
    rt    = instr[20:16];
    rd    = instr[15:11];
    imm16 = instr[15:0];
    rw    = ctrl.reg_dst ? rd : rt;            // RegDst mux
  end

  // Writes are blocked during reset so a program load leaves state alone
  register_file u_rf (
    .clk    (clk),
    .reg_wr (ctrl.reg_write & ~rst),
    .rw     (rw),
    .bus_w  (bus_w),
    .ra     (rs),
    .rb     (rt),
    .bus_a  (bus_a),
    .bus_b  (bus_b)
  );

  extender u_ext (
    .imm    (imm16),
    .ext_op (ctrl.ext_op),
    .ext    (imm_ext)
  );

  assign alu_b = ctrl.alu_src ? imm_ext : bus_b;  // ALUSrc mux

  alu u_alu (
    .alu_ctr (alu_ctr),
    .a       (bus_a),
    .b       (alu_b),
    .result  (alu_out),
    .zero    (zero)
  );

  data_memory #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk      (clk),
    .wr_en    (ctrl.mem_write & ~rst),
    .adr      (alu_out),
    .data_in  (bus_b),
    .data_out (mem_out)
  );

  assign bus_w = ctrl.mem_to_reg ? mem_out : alu_out;  // MemtoReg mux

  always_comb begin
    dbg_reg_we    = ctrl.reg_write & ~rst;
    dbg_reg_waddr = rw;
    dbg_reg_wdata = bus_w;
    dbg_mem_we    = ctrl.mem_write & ~rst;
    dbg_mem_addr  = alu_out;
    dbg_mem_wdata = bus_b;
  end

endmodule
