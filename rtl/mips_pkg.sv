// Shared types and constants of the single-cycle MIPS-subset processor.
//
// The processor executes seven instructions: add, sub (R-type), ori, lw,
// sw, beq (I-type) and j (J-type). Opcodes and function codes are the MIPS
// ones. Control is split in two levels: the main control decodes the 6-bit
// op field into datapath controls plus a 3-bit ALUop; a small local ALU
// control combines ALUop with the func field into the 3-bit ALUctr.
//
// The ALUctr and ALUop encodings below are the ones the control truth
// tables of the design use. The control bundle struct is this design's own
// way of passing the control lines around.
package mips_pkg;

  // op field (Instruction<31:26>)
  typedef enum logic [5:0] {
    OP_RTYPE = 6'b00_0000,
    OP_ORI   = 6'b00_1101,
    OP_LW    = 6'b10_0011,
    OP_SW    = 6'b10_1011,
    OP_BEQ   = 6'b00_0100,
    OP_J     = 6'b00_0010
  } opcode_e;

  // func field (Instruction<5:0>) of the R-type instructions the ALU
  // control decodes
  typedef enum logic [5:0] {
    FN_ADD = 6'b10_0000,
    FN_SUB = 6'b10_0010,
    FN_AND = 6'b10_0100,
    FN_OR  = 6'b10_0101,
    FN_SLT = 6'b10_1010
  } funct_e;

  // ALUctr: operation the ALU performs
  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110,
    ALU_SLT = 3'b111
  } alu_ctr_e;

  // ALUop: what the main control asks of the ALU control
  typedef enum logic [2:0] {
    ALUOP_ADD   = 3'b000,
    ALUOP_SUB   = 3'b001,
    ALUOP_OR    = 3'b010,
    ALUOP_RTYPE = 3'b100
  } alu_op_e;

  // Control lines from the main control to the datapath
  typedef struct packed {
    logic       reg_dst;     // 1: write register is rd, 0: rt
    logic       alu_src;     // 1: ALU B input is the extended immediate
    logic       mem_to_reg;  // 1: busW comes from data memory
    logic       reg_write;   // register file write enable
    logic       mem_write;   // data memory write enable
    logic       branch;      // beq: take branch target when Zero
    logic       jump;        // j: next PC from the target field
    logic       ext_op;      // 1: sign-extend imm16, 0: zero-extend
    logic [2:0] alu_op;      // to the ALU control
  } ctrl_t;

endpackage
