// Instruction fetch unit.
//
// Holds the program counter and fetches the current instruction. Because
// instructions are aligned words, only PC<31:2> is stored: a 30-bit word
// counter, with Addr<1:0> of the instruction memory tied to "00".
//
// Next-PC logic, all on 30-bit word addresses:
//   seq    = PC + 1                                 (next instruction)
//   target = PC + 1 + SignExt(imm16)                (beq target)
//   pick   = (Branch & Zero) ? target : seq
//   nextPC = Jump ? {PC<31:28>, Instruction<25:0>} : pick
// so beq and j take effect on the very next fetch, with no delay slot. The
// jump field is joined to the upper four bits of the current PC.
//
// The PC is loaded at the falling edge of Clk. rst (asynchronous, active
// high) sets it to RESET_PC; the reset and its value are this design's
// additions. The instruction memory inside is loaded through the imem_*
// port while the processor is held in reset.
module instruction_fetch_unit #(
  parameter int unsigned IMEM_WORDS = 2048,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        branch,
  input  logic        jump,
  input  logic        zero,
  output logic [31:0] instr,       // Instruction<31:0>
  output logic [31:0] pc,          // byte address of instr
  // program load into the instruction memory
  input  logic        imem_we,
  input  logic [29:0] imem_waddr,
  input  logic [31:0] imem_wdata
);

  logic [29:0] pc_q;        // PC<31:2>
  logic [29:0] pc_seq;
  logic [29:0] pc_target;
  logic [29:0] pc_pick;
  logic [29:0] pc_next;
  logic [29:0] imm_ext;

  instruction_memory #(.WORDS(IMEM_WORDS)) u_imem (
    .clk   (clk),
    .addr  (pc_q),
    .instr (instr),
    .we    (imem_we),
    .waddr (imem_waddr),
    .wdata (imem_wdata)
  );

  always_comb begin
    imm_ext   = {{14{instr[15]}}, instr[15:0]};
    pc_seq    = pc_q + 30'd1;
    pc_target = pc_seq + imm_ext;
    pc_pick   = (branch & zero) ? pc_target : pc_seq;
    pc_next   = jump ? {pc_q[29:26], instr[25:0]} : pc_pick;
  end

  always_ff @(negedge clk or posedge rst) begin
    if (rst) pc_q <= RESET_PC[31:2];
    else     pc_q <= pc_next;
  end

  assign pc = {pc_q, 2'b00};

endmodule
