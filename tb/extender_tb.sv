// Self-checking testbench for the immediate extender: sign extension with
// ExtOp = 1, zero extension with ExtOp = 0, on corner and random values.
module extender_tb;

  logic [15:0] imm;
  logic        ext_op;
  logic [31:0] ext;
  int checks = 0, failures = 0;

  extender dut (.imm(imm), .ext_op(ext_op), .ext(ext));

  task automatic check();
    logic [31:0] exp;
    #1;
    exp = ext_op ? 32'($signed(imm)) : {16'h0, imm};
    checks++;
    if (ext !== exp) begin
      failures++;
      $display("FAIL imm=%h ext_op=%b got=%h exp=%h", imm, ext_op, ext, exp);
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
    for (int e = 0; e < 2; e++) begin
      ext_op = e[0];
      imm = 16'h0000; check();
      imm = 16'h7fff; check();
      imm = 16'h8000; check();
      imm = 16'hffff; check();
      for (int n = 0; n < 200; n++) begin imm = 16'($urandom); check(); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
