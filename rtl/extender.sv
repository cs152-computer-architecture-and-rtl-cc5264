// Immediate extender.
//
// Widens the 16-bit immediate of an I-type instruction to 32 bits. With
// ExtOp = 1 it copies bit 15 into the upper half (sign extension, used by
// lw and sw address arithmetic); with ExtOp = 0 it fills the upper half
// with zeros (used by ori). Combinational.
module extender #(
  parameter int unsigned IN_WIDTH  = 16,
  parameter int unsigned OUT_WIDTH = 32
) (
  input  logic [IN_WIDTH-1:0]  imm,
  input  logic                 ext_op,
  output logic [OUT_WIDTH-1:0] ext
);

  always_comb begin
    ext = {{(OUT_WIDTH-IN_WIDTH){ext_op & imm[IN_WIDTH-1]}}, imm};
  end

endmodule
