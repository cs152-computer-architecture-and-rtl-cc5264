// Self-checking testbench for main_control.
//
// Applies all 64 op values. For the six opcodes of the subset it compares
// every control line with the main control truth table (entries marked x
// there are not checked); every other opcode must drive all lines low.
module main_control_tb;
  import mips_pkg::*;

  logic [5:0] op;
  ctrl_t      ctrl;
  int checks = 0, failures = 0;

  main_control dut (.op(op), .ctrl(ctrl));

  // Expected values: RegDst ALUSrc MemtoReg RegWrite MemWrite Branch Jump
  // ExtOp ALUop<2:0>, with a mask that is 0 where the table says x.
  task automatic expect_ctrl(string name, logic [10:0] exp, logic [10:0] care);
    logic [10:0] got;
    got = {ctrl.reg_dst, ctrl.alu_src, ctrl.mem_to_reg, ctrl.reg_write,
           ctrl.mem_write, ctrl.branch, ctrl.jump, ctrl.ext_op, ctrl.alu_op};
    checks++;
    if ((got & care) !== (exp & care)) begin
      failures++;
      $display("FAIL %s op=%b got=%b exp=%b care=%b", name, op, got, exp, care);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      op = 6'(i);
      #1;
      case (op)
        //                                RdAsMtRwMwBrJpEx ALUop
        6'b00_0000: expect_ctrl("R-type", 11'b1_0_0_1_0_0_0_0_100, 11'b1_1_1_1_1_1_1_0_111);
        6'b00_1101: expect_ctrl("ori",    11'b0_1_0_1_0_0_0_0_010, 11'b1_1_1_1_1_1_1_1_111);
        6'b10_0011: expect_ctrl("lw",     11'b0_1_1_1_0_0_0_1_000, 11'b1_1_1_1_1_1_1_1_111);
        6'b10_1011: expect_ctrl("sw",     11'b0_1_0_0_1_0_0_1_000, 11'b0_1_0_1_1_1_1_1_111);
        6'b00_0100: expect_ctrl("beq",    11'b0_0_0_0_0_1_0_0_001, 11'b0_1_0_1_1_1_1_0_111);
        6'b00_0010: expect_ctrl("jump",   11'b0_0_0_0_0_0_1_0_000, 11'b0_0_0_1_1_1_1_0_000);
        default:    expect_ctrl("other",  11'b0,                   11'h7ff);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
