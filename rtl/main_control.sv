// Main control of the single-cycle processor.
//
// Decodes the 6-bit op field into the datapath control lines and the 3-bit
// ALUop, built as a two-level PLA: an AND plane of six product terms, one
// per instruction class (R-type, ori, lw, sw, beq, jump), each matching the
// full opcode, and an OR plane that ORs the product terms into each output:
//   RegWrite = R-type + ori + lw     ALUSrc = ori + lw + sw
//   RegDst   = R-type                MemtoReg = lw     MemWrite = sw
//   Branch   = beq    Jump = jump    ExtOp = lw + sw
//   ALUop<2> = R-type ALUop<1> = ori ALUop<0> = beq
// Entries that the instruction does not care about come out as 0 in a PLA,
// so an opcode outside the subset drives every control line low: it writes
// no register and no memory and lets the PC advance by one word. That
// handling of unknown opcodes is this design's choice.
//
// Purely combinational; the control lines settle one decode delay after the
// instruction does. An assertion checks that no opcode turns on more than
// one of RegWrite, MemWrite, Branch and Jump.
module main_control
  import mips_pkg::*;
(
  input  logic [5:0] op,    // Instruction<31:26>
  output ctrl_t      ctrl
);

  // AND plane
  logic t_rtype, t_ori, t_lw, t_sw, t_beq, t_jump;

  always_comb begin
    t_rtype = ~op[5] & ~op[4] & ~op[3] & ~op[2] & ~op[1] & ~op[0];
    t_ori   = ~op[5] & ~op[4] &  op[3] &  op[2] & ~op[1] &  op[0];
    t_lw    =  op[5] & ~op[4] & ~op[3] & ~op[2] &  op[1] &  op[0];
    t_sw    =  op[5] & ~op[4] &  op[3] & ~op[2] &  op[1] &  op[0];
    t_beq   = ~op[5] & ~op[4] & ~op[3] &  op[2] & ~op[1] & ~op[0];
    t_jump  = ~op[5] & ~op[4] & ~op[3] & ~op[2] &  op[1] & ~op[0];
  end

  // OR plane
  always_comb begin
    ctrl.reg_write  = t_rtype | t_ori | t_lw;
    ctrl.alu_src    = t_ori | t_lw | t_sw;
    ctrl.reg_dst    = t_rtype;
    ctrl.mem_to_reg = t_lw;
    ctrl.mem_write  = t_sw;
    ctrl.branch     = t_beq;
    ctrl.jump       = t_jump;
    ctrl.ext_op     = t_lw | t_sw;
    ctrl.alu_op     = {t_rtype, t_ori, t_beq};
  end

  // Each instruction changes at most one kind of state: a register, a
  // memory word, or the PC by branch or jump.
  always_comb begin
    assert ((32'(ctrl.reg_write) + 32'(ctrl.mem_write) + 32'(ctrl.branch)
             + 32'(ctrl.jump)) <= 1)
      else $error("main_control: conflicting control lines for op %b", op);
  end

endmodule
