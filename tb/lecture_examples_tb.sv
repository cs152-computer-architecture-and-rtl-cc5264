// Directed testbench: the two timing examples that set this single-cycle
// processor apart from a pipelined MIPS, run on the processor at its
// default parameters.
//
//   0x0000  j    0x1000          jump takes effect at once:
//   0x0004  add  $1, $2, $3      never executed (no branch delay slot)
//   0x1000  ori  $2, $0, 0x30
//   0x1004  ori  $3, $0, 5
//   0x1008  sub  $1, $2, $3      $1 = 0x2b
//   0x100c  sw   $3, 100($2)     mem[0x94] = 5
//   0x1010  ori  $1, $0, 7       "old" $1 = 7
//   0x1014  lw   $1, 100($2)     $1 = 5
//   0x1018  add  $3, $1, $0      gets the "new" $1 = 5 (no load delay)
//   0x101c  add  $4, $1, $0      $4 = 5
//   0x1020  beq  $3, $4, -1      taken: branches to itself
//
// Each cycle the PC and the register or memory write are compared with
// the values listed above; one instruction completes per cycle.
module lecture_examples_tb;
  import mips_tb_pkg::*;

  logic        clk = 0, rst;
  logic        imem_we;
  logic [29:0] imem_waddr;
  logic [31:0] imem_wdata;
  logic [31:0] dbg_pc, dbg_instr, dbg_reg_wdata, dbg_mem_addr, dbg_mem_wdata;
  logic        dbg_reg_we, dbg_mem_we;
  logic [4:0]  dbg_reg_waddr;
  int checks = 0, failures = 0;

  single_cycle_cpu dut (
    .clk(clk), .rst(rst),
    .imem_we(imem_we), .imem_waddr(imem_waddr), .imem_wdata(imem_wdata),
    .dbg_pc(dbg_pc), .dbg_instr(dbg_instr),
    .dbg_reg_we(dbg_reg_we), .dbg_reg_waddr(dbg_reg_waddr), .dbg_reg_wdata(dbg_reg_wdata),
    .dbg_mem_we(dbg_mem_we), .dbg_mem_addr(dbg_mem_addr), .dbg_mem_wdata(dbg_mem_wdata));

  always #5 clk = ~clk;

  task automatic load(logic [31:0] byte_addr, logic [31:0] word);
    @(posedge clk);
    imem_we = 1; imem_waddr = byte_addr[31:2]; imem_wdata = word;
  endtask

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL pc=%h %s got=%h exp=%h", dbg_pc, what, got, exp);
    end
  endtask

  // expect one cycle: PC, then a register write (we=1) or none, and a memory write or none
  task automatic step(logic [31:0] pc, bit rwe, logic [4:0] rw, logic [31:0] rdata,
                      bit mwe, logic [31:0] maddr, logic [31:0] mdata);
    check("pc", dbg_pc, pc);
    check("reg_we", 32'(dbg_reg_we), 32'(rwe));
    if (rwe) begin
      check("reg_waddr", 32'(dbg_reg_waddr), 32'(rw));
      check("reg_wdata", dbg_reg_wdata, rdata);
    end
    check("mem_we", 32'(dbg_mem_we), 32'(mwe));
    if (mwe) begin
      check("mem_addr", dbg_mem_addr, maddr);
      check("mem_wdata", dbg_mem_wdata, mdata);
    end
    @(negedge clk);
    @(posedge clk);
    #1;
  endtask

  initial begin
    #5000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; imem_we = 0;
    load(32'h0000, enc_j(26'h400));
    load(32'h0004, enc_r(F_ADD, 5'd1, 5'd2, 5'd3));
    load(32'h1000, enc_i(OP_ORI, 5'd2, 5'd0, 16'h0030));
    load(32'h1004, enc_i(OP_ORI, 5'd3, 5'd0, 16'h0005));
    load(32'h1008, enc_r(F_SUB, 5'd1, 5'd2, 5'd3));
    load(32'h100c, enc_i(OP_SW, 5'd3, 5'd2, 16'd100));
    load(32'h1010, enc_i(OP_ORI, 5'd1, 5'd0, 16'h0007));
    load(32'h1014, enc_i(OP_LW, 5'd1, 5'd2, 16'd100));
    load(32'h1018, enc_r(F_ADD, 5'd3, 5'd1, 5'd0));
    load(32'h101c, enc_r(F_ADD, 5'd4, 5'd1, 5'd0));
    load(32'h1020, enc_i(OP_BEQ, 5'd4, 5'd3, 16'hffff));
    @(posedge clk);
    imem_we = 0;
    rst = 0;
    #1;
    //    pc        reg write           mem write
    step(32'h0000, 0, 0, 0,           0, 0, 0);
    step(32'h1000, 1, 2, 32'h30,      0, 0, 0);
    step(32'h1004, 1, 3, 32'h5,       0, 0, 0);
    step(32'h1008, 1, 1, 32'h2b,      0, 0, 0);
    step(32'h100c, 0, 0, 0,           1, 32'h94, 32'h5);
    step(32'h1010, 1, 1, 32'h7,       0, 0, 0);
    step(32'h1014, 1, 1, 32'h5,       0, 0, 0);
    step(32'h1018, 1, 3, 32'h5,       0, 0, 0);
    step(32'h101c, 1, 4, 32'h5,       0, 0, 0);
    step(32'h1020, 0, 0, 0,           0, 0, 0);
    step(32'h1020, 0, 0, 0,           0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
