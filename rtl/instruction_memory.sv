// Instruction memory.
//
// Word-organised store of 32-bit instructions. The fetch port is
// asynchronous: the instruction at word address Addr<31:2> appears after
// the access time, within the same cycle. Address bits above the memory's
// size are ignored, so the program image repeats through the address space.
//
// The fetch side is what the processor uses. The size (2048 words, 8 KiB,
// so that code at byte address 0x1000 fits) and the write port that loads
// a program (we, waddr, wdata, written at the falling clock edge) are this
// design's choices; the processor itself never writes instructions.
module instruction_memory #(
  parameter int unsigned WORDS = 2048,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic        clk,
  // fetch
  input  logic [29:0] addr,     // Addr<31:2>, a word address
  output logic [31:0] instr,
  // program load
  input  logic        we,
  input  logic [29:0] waddr,    // word address
  input  logic [31:0] wdata
);

  logic [31:0] mem [WORDS];

  always_ff @(negedge clk) begin
    if (we) mem[waddr[AW-1:0]] <= wdata;
  end

  assign instr = mem[addr[AW-1:0]];

endmodule
