// Self-checking testbench for the 32-bit ALU.
//
// Random and corner-case operands for each of the five operations; the
// result and the Zero flag are compared with values computed here.
module alu_tb;

  logic [2:0]  alu_ctr;
  logic [31:0] a, b, result;
  logic        zero;
  int checks = 0, failures = 0;

  alu dut (.alu_ctr(alu_ctr), .a(a), .b(b), .result(result), .zero(zero));

  function automatic logic [31:0] ref_op(logic [2:0] c, logic [31:0] x, logic [31:0] y);
    case (c)
      3'b010: return x + y;
      3'b110: return x - y;
      3'b000: return x & y;
      3'b001: return x | y;
      3'b111: return {31'd0, $signed(x) < $signed(y)};
      default: return '0;
    endcase
  endfunction

  task automatic check();
    logic [31:0] exp;
    #1;
    exp = ref_op(alu_ctr, a, b);
    checks++;
    if (result !== exp || zero !== (exp == 0)) begin
      failures++;
      $display("FAIL ctr=%b a=%h b=%h got=%h/%b exp=%h", alu_ctr, a, b, result, zero, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [2:0] OPS [5] = '{3'b010, 3'b110, 3'b000, 3'b001, 3'b111};
  localparam logic [31:0] CORNER [6] = '{32'h0, 32'h1, 32'hffff_ffff,
                                         32'h7fff_ffff, 32'h8000_0000, 32'h1234_5678};

  initial begin
    foreach (OPS[k]) begin
      alu_ctr = OPS[k];
      foreach (CORNER[i]) foreach (CORNER[j]) begin
        a = CORNER[i]; b = CORNER[j]; check();
      end
      for (int n = 0; n < 500; n++) begin
        a = $urandom; b = (n % 5 == 0) ? a : $urandom; check();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
