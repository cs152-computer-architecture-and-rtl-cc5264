// End-to-end testbench for the single-cycle processor, at its default
// parameters.
//
// Loads a random program (see mips_tb_pkg::gen_program) through the
// instruction memory port while in reset, then runs it for RUN_CYCLES
// cycles. Every cycle it compares the PC, the instruction, and the
// register and data memory write the processor makes with the
// instruction-level reference model, which executes one instruction per
// cycle, so the check also confirms CPI = 1.
//
// It counts how often each mechanism occurred and fails if one never did:
// each of add, sub, and, or, slt, ori, lw, sw; beq taken and not taken; j;
// a load whose result the very next instruction uses (no load delay); a
// write to $0 that must leave it zero.
module single_cycle_cpu_tb;
  import mips_tb_pkg::*;

  localparam int RUN_CYCLES = 20000;
  localparam int BODY_LEN   = 300;

  logic        clk = 0, rst;
  logic        imem_we;
  logic [29:0] imem_waddr;
  logic [31:0] imem_wdata;
  logic [31:0] dbg_pc, dbg_instr, dbg_reg_wdata, dbg_mem_addr, dbg_mem_wdata;
  logic        dbg_reg_we, dbg_mem_we;
  logic [4:0]  dbg_reg_waddr;

  int checks = 0, failures = 0;
  int cycles = 0;

  single_cycle_cpu dut (
    .clk(clk), .rst(rst),
    .imem_we(imem_we), .imem_waddr(imem_waddr), .imem_wdata(imem_wdata),
    .dbg_pc(dbg_pc), .dbg_instr(dbg_instr),
    .dbg_reg_we(dbg_reg_we), .dbg_reg_waddr(dbg_reg_waddr), .dbg_reg_wdata(dbg_reg_wdata),
    .dbg_mem_we(dbg_mem_we), .dbg_mem_addr(dbg_mem_addr), .dbg_mem_wdata(dbg_mem_wdata));

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL cycle %0d pc=%h %s got=%h exp=%h", cycles, dbg_pc, what, got, exp);
    end
  endtask

  // mechanism counters
  typedef enum int { M_ADD, M_SUB, M_AND, M_OR, M_SLT, M_ORI, M_LW, M_SW,
                     M_BEQ_TAKEN, M_BEQ_NOT, M_J, M_LOAD_USE, M_R0_WRITE, M_N } mech_e;
  int count [M_N];
  string mech_name [M_N] = '{"add", "sub", "and", "or", "slt", "ori", "lw", "sw",
                             "beq taken", "beq not taken", "j", "load used next",
                             "write to $0"};

  initial begin
    #((RUN_CYCLES + 2000) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] prog[$];
    isa_model    m;
    effect_t     e;
    logic [4:0]  last_load_dst;
    bit          last_was_load;

    m = new();
    foreach (count[i]) count[i] = 0;
    gen_program(prog, BODY_LEN);
    rst = 1; imem_we = 0;
    foreach (prog[i]) begin
      @(posedge clk);
      imem_we = 1; imem_waddr = 30'(i); imem_wdata = prog[i];
    end
    @(posedge clk);
    imem_we = 0;
    #1;
    check("reset pc", dbg_pc, 32'h0);
    rst = 0;
    #1;
    last_was_load = 0; last_load_dst = 0;

    for (cycles = 0; cycles < RUN_CYCLES; cycles++) begin
      logic [31:0] ins;
      logic [5:0]  op;
      ins = prog[m.pc[31:2]];
      op  = ins[31:26];
      check("pc", dbg_pc, m.pc);
      check("instr", dbg_instr, ins);
      // mechanisms, from the instruction and the model state before it runs
      if (last_was_load && last_load_dst != 0 &&
          (ins[25:21] == last_load_dst ||
           (op inside {OP_R, OP_BEQ, OP_SW} && ins[20:16] == last_load_dst)))
        count[M_LOAD_USE]++;
      e = m.step(ins);
      case (op)
        OP_R: case (ins[5:0])
                F_ADD: count[M_ADD]++;
                F_SUB: count[M_SUB]++;
                F_AND: count[M_AND]++;
                F_OR:  count[M_OR]++;
                F_SLT: count[M_SLT]++;
                default: ;
              endcase
        OP_ORI: count[M_ORI]++;
        OP_LW:  count[M_LW]++;
        OP_SW:  count[M_SW]++;
        OP_BEQ: if (e.taken) count[M_BEQ_TAKEN]++; else count[M_BEQ_NOT]++;
        OP_J:   count[M_J]++;
        default: ;
      endcase
      if (e.reg_we && e.reg_addr == 0) count[M_R0_WRITE]++;
      last_was_load = (op == OP_LW);
      last_load_dst = ins[20:16];
      // the writes this instruction makes
      check("reg_we", 32'(dbg_reg_we), 32'(e.reg_we));
      if (e.reg_we) begin
        check("reg_waddr", 32'(dbg_reg_waddr), 32'(e.reg_addr));
        check("reg_wdata", dbg_reg_wdata, e.reg_data);
      end
      check("mem_we", 32'(dbg_mem_we), 32'(e.mem_we));
      if (e.mem_we) begin
        check("mem_addr", dbg_mem_addr, e.mem_addr);
        check("mem_wdata", dbg_mem_wdata, e.mem_data);
      end
      @(negedge clk);
      @(posedge clk);
      #1;
    end
    // $0 is zero in the reference, so every later read of it was checked
    foreach (count[i]) begin
      checks++;
      $display("%-16s %0d", mech_name[i], count[i]);
      if (count[i] == 0) begin
        failures++;
        $display("FAIL mechanism '%s' never occurred", mech_name[i]);
      end
    end
    $display("instructions retired %0d in %0d cycles", RUN_CYCLES, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
