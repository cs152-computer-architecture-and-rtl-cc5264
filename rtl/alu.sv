// 32-bit ALU of the single-cycle datapath.
//
// ALUctr selects one of five operations on busA (a) and the ALU B input
// (b): 010 add, 110 subtract, 000 and, 001 or, 111 set-on-less-than (result
// 1 when a < b as two's-complement numbers, else 0). Zero is 1 when the
// result is all zeros; beq subtracts its two registers and branches on it.
// The other three ALUctr codes are unused and give 0.
//
// The operation list and encoding follow the design's ALU control tables;
// how the operations are built (one adder/subtracter, signed comparison for
// set-on-less-than, wrap-around with no overflow trap) is this design's
// choice. Purely combinational.
module alu
  import mips_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [2:0]       alu_ctr,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] result,
  output logic             zero
);

  logic [WIDTH-1:0] sum;
  logic             less;

  always_comb begin
    // ALUctr<2> selects subtraction in the shared adder (sub and slt)
    sum  = a + (alu_ctr[2] ? ~b : b) + {{(WIDTH-1){1'b0}}, alu_ctr[2]};
    less = $signed(a) < $signed(b);
    unique case (alu_ctr)
      ALU_ADD, ALU_SUB: result = sum;
      ALU_AND:          result = a & b;
      ALU_OR:           result = a | b;
      ALU_SLT:          result = {{(WIDTH-1){1'b0}}, less};
      default:          result = '0;
    endcase
    zero = (result == '0);
  end

endmodule
