// Data memory.
//
// 32-bit words addressed by the byte address Adr (the ALU result); Adr<1:0>
// are ignored, so accesses are whole aligned words. Reading is
// asynchronous: Data Out follows Adr within the cycle, as lw needs in a
// single-cycle machine. When WrEn is 1, Data In is written at the falling
// edge of Clk. Address bits above the memory's size are ignored.
//
// The read/write behaviour follows the design's datapath; the size (1024
// words), word-only access and address wrap-around are this design's
// choices. The memory has no reset.
module data_memory #(
  parameter int unsigned WORDS = 1024,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic        wr_en,     // WrEn (MemWr)
  input  logic [31:0] adr,       // byte address
  input  logic [31:0] data_in,
  output logic [31:0] data_out
);

  logic [31:0] mem [WORDS];

  always_ff @(negedge clk) begin
    if (wr_en) mem[adr[AW+1:2]] <= data_in;
  end

  assign data_out = mem[adr[AW+1:2]];

endmodule
