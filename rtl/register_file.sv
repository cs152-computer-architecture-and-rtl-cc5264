// Register file: 32 registers of 32 bits.
//
// Two read ports and one write port. busA and busB show the registers named
// by Ra and Rb combinationally, so an instruction reads its operands in the
// same cycle it is fetched. When RegWr is 1, busW is written into register
// Rw at the falling edge of Clk, the edge that also updates the PC, so the
// result is visible to the very next instruction.
//
// Register 0 always reads as zero and ignores writes, as in MIPS, where
// "add $3, $1, $0" moves $1 into $3. The registers have no reset: software
// sets any register before reading it. Both choices are this design's.
module register_file #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             reg_wr,   // RegWr
  input  logic [AW-1:0]    rw,       // write register
  input  logic [WIDTH-1:0] bus_w,    // write data
  input  logic [AW-1:0]    ra,
  input  logic [AW-1:0]    rb,
  output logic [WIDTH-1:0] bus_a,
  output logic [WIDTH-1:0] bus_b
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(negedge clk) begin
    if (reg_wr && rw != '0) regs[rw] <= bus_w;
  end

  always_comb begin
    bus_a = (ra == '0) ? '0 : regs[ra];
    bus_b = (rb == '0) ? '0 : regs[rb];
  end

endmodule
