// Self-checking testbench for the instruction fetch unit.
//
// Fills the instruction memory with random words, releases reset and then
// drives Branch, Jump and Zero at random for many cycles. Each cycle the
// fetched instruction and the PC are compared with a reference that
// computes the next PC from the instruction-set rules: PC + 4, the beq
// target PC + 4 + SignExt(imm16) * 4, or the jump target
// {PC<31:28>, target, 00}. Counts sequential steps, taken and untaken
// branches and jumps, and fails if any never happened.
module instruction_fetch_unit_tb;

  localparam int unsigned WORDS = 2048;
  logic        clk = 0, rst;
  logic        branch, jump, zero;
  logic [31:0] instr, pc;
  logic        imem_we;
  logic [29:0] imem_waddr;
  logic [31:0] imem_wdata;
  logic [31:0] model [WORDS];
  logic [31:0] ref_pc;
  int checks = 0, failures = 0;
  int n_seq = 0, n_taken = 0, n_untaken = 0, n_jump = 0;

  instruction_fetch_unit dut (
    .clk(clk), .rst(rst), .branch(branch), .jump(jump), .zero(zero),
    .instr(instr), .pc(pc),
    .imem_we(imem_we), .imem_waddr(imem_waddr), .imem_wdata(imem_wdata));

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; branch = 0; jump = 0; zero = 0; imem_we = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(posedge clk);
      imem_we = 1; imem_waddr = 30'(i); imem_wdata = $urandom; model[i] = imem_wdata;
    end
    @(posedge clk); imem_we = 0;
    #1 check("reset pc", pc, 32'h0);
    rst = 0;
    ref_pc = 0;
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] ins, nxt;
      // inputs change just after the rising edge; state moves at the
      // falling edge
      ins = model[ref_pc[12:2]];
      check("pc", pc, ref_pc);
      check("instr", instr, ins);
      jump   = ($urandom % 6) == 0;
      branch = !jump && ($urandom % 3) == 0;
      zero   = $urandom % 2;
      nxt = ref_pc + 4;
      if (jump) begin
        nxt = {ref_pc[31:28], ins[25:0], 2'b00}; n_jump++;
      end else if (branch && zero) begin
        nxt = ref_pc + 4 + ({{16{ins[15]}}, ins[15:0]} << 2); n_taken++;
      end else begin
        if (branch) n_untaken++; else n_seq++;
      end
      // with Branch and Zero both high and Jump too, Jump wins
      if (n % 97 == 0) begin
        jump = 1; branch = 1; zero = 1;
        nxt = {ref_pc[31:28], ins[25:0], 2'b00};
      end
      @(negedge clk);
      ref_pc = nxt;
      @(posedge clk);
      #1;
    end
    checks++;
    if (n_seq == 0 || n_taken == 0 || n_untaken == 0 || n_jump == 0) begin
      failures++;
      $display("FAIL a case never occurred");
    end
    $display("seq=%0d taken=%0d untaken=%0d jump=%0d", n_seq, n_taken, n_untaken, n_jump);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
