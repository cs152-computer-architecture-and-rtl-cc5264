// Local ALU control.
//
// Combines the 3-bit ALUop from the main control with the low four bits of
// the R-type func field into the 3-bit ALUctr that selects the ALU
// operation. For ALUop<2> = 0 the main control names the operation itself
// (000 add, 001 subtract, 010 or); for ALUop<2> = 1 (R-type) func<3:0>
// chooses: 0000 add, 0010 subtract, 0100 and, 0101 or, 1010
// set-on-less-than. ALUctr is 010 add, 110 subtract, 000 and, 001 or,
// 111 set-on-less-than.
//
// Each output bit is the two-level sum of products read off the ALUctr
// truth table, with the unused ALUop and func combinations as don't cares:
//   ALUctr<2> = !ALUop<2> & ALUop<0> + ALUop<2> & !func<2> & func<1> & !func<0>
//   ALUctr<1> = !ALUop<2> & !ALUop<1> + ALUop<2> & !func<2> & !func<0>
//   ALUctr<0> = !ALUop<2> & ALUop<1>
//             + ALUop<2> & !func<3> & func<2> & !func<1> & func<0>
//             + ALUop<2> & func<3> & !func<2> & func<1> & !func<0>
// func<5:4> are not looked at. Combinational.
module alu_control
  import mips_pkg::*;
(
  input  logic [2:0] alu_op,
  input  logic [5:0] func,
  output logic [2:0] alu_ctr
);

  always_comb begin
    alu_ctr[2] = (~alu_op[2] & alu_op[0])
               | ( alu_op[2] & ~func[2] & func[1] & ~func[0]);
    alu_ctr[1] = (~alu_op[2] & ~alu_op[1])
               | ( alu_op[2] & ~func[2] & ~func[0]);
    alu_ctr[0] = (~alu_op[2] & alu_op[1])
               | ( alu_op[2] & ~func[3] &  func[2] & ~func[1] &  func[0])
               | ( alu_op[2] &  func[3] & ~func[2] &  func[1] & ~func[0]);
  end

endmodule
