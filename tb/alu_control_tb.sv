// Self-checking testbench for alu_control.
//
// For the three I-type ALUop codes (add, subtract, or) every func value
// must give the same ALUctr; for ALUop = R-type the five func codes add,
// sub, and, or, slt must give their ALUctr. Expected codes come from the
// ALU operation table: 010 add, 110 subtract, 000 and, 001 or, 111 slt.
module alu_control_tb;

  logic [2:0] alu_op;
  logic [5:0] func;
  logic [2:0] alu_ctr;
  int checks = 0, failures = 0;

  alu_control dut (.alu_op(alu_op), .func(func), .alu_ctr(alu_ctr));

  task automatic check(logic [2:0] exp);
    #1;
    checks++;
    if (alu_ctr !== exp) begin
      failures++;
      $display("FAIL ALUop=%b func=%b got=%b exp=%b", alu_op, func, alu_ctr, exp);
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
    for (int f = 0; f < 64; f++) begin
      func = 6'(f);
      alu_op = 3'b000; check(3'b010);   // lw, sw: add
      alu_op = 3'b001; check(3'b110);   // beq: subtract
      alu_op = 3'b010; check(3'b001);   // ori: or
    end
    alu_op = 3'b100;
    func = 6'b10_0000; check(3'b010);   // add
    func = 6'b10_0010; check(3'b110);   // sub
    func = 6'b10_0100; check(3'b000);   // and
    func = 6'b10_0101; check(3'b001);   // or
    func = 6'b10_1010; check(3'b111);   // slt
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
