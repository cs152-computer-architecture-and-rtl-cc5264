// Self-checking testbench for the single-cycle datapath on its own.
//
// The testbench plays the control unit: it decodes the fetched instruction
// with its own copy of the control-signal summary table (don't cares set
// to 0) and drives the control lines and ALUctr. A random program runs
// against the instruction-level reference model; each cycle the PC, the
// instruction and the register and memory writes are compared. Counts
// executed instructions of every kind and fails if one never ran.
module datapath_tb;
  import mips_pkg::*;
  import mips_tb_pkg::*;

  localparam int RUN_CYCLES = 5000;

  logic        clk = 0, rst;
  ctrl_t       ctrl;
  logic [2:0]  alu_ctr;
  logic [31:0] instr;
  logic        imem_we;
  logic [29:0] imem_waddr;
  logic [31:0] imem_wdata;
  logic [31:0] dbg_pc, dbg_reg_wdata, dbg_mem_addr, dbg_mem_wdata;
  logic        dbg_reg_we, dbg_mem_we;
  logic [4:0]  dbg_reg_waddr;
  int checks = 0, failures = 0;
  int kinds [7];    // R-type, ori, lw, sw, beq taken, beq not taken, j

  datapath dut (
    .clk(clk), .rst(rst), .ctrl(ctrl), .alu_ctr(alu_ctr), .instr(instr),
    .imem_we(imem_we), .imem_waddr(imem_waddr), .imem_wdata(imem_wdata),
    .dbg_pc(dbg_pc), .dbg_reg_we(dbg_reg_we), .dbg_reg_waddr(dbg_reg_waddr),
    .dbg_reg_wdata(dbg_reg_wdata), .dbg_mem_we(dbg_mem_we),
    .dbg_mem_addr(dbg_mem_addr), .dbg_mem_wdata(dbg_mem_wdata));

  always #5 clk = ~clk;

  // Control summary: RegDst ALUSrc MemtoReg RegWrite MemWrite Branch Jump ExtOp
  always_comb begin
    logic [7:0] c;
    case (instr[31:26])
      OP_R:    c = 8'b1_0_0_1_0_0_0_0;
      OP_ORI:  c = 8'b0_1_0_1_0_0_0_0;
      OP_LW:   c = 8'b0_1_1_1_0_0_0_1;
      OP_SW:   c = 8'b0_1_0_0_1_0_0_1;
      OP_BEQ:  c = 8'b0_0_0_0_0_1_0_0;
      OP_J:    c = 8'b0_0_0_0_0_0_1_0;
      default: c = 8'b0;
    endcase
    {ctrl.reg_dst, ctrl.alu_src, ctrl.mem_to_reg, ctrl.reg_write,
     ctrl.mem_write, ctrl.branch, ctrl.jump, ctrl.ext_op} = c;
    ctrl.alu_op = '0;       // the datapath does not use it
    case (instr[31:26])
      OP_R: case (instr[5:0])
              F_ADD:   alu_ctr = 3'b010;
              F_SUB:   alu_ctr = 3'b110;
              F_AND:   alu_ctr = 3'b000;
              F_OR:    alu_ctr = 3'b001;
              default: alu_ctr = 3'b111;
            endcase
      OP_ORI:  alu_ctr = 3'b001;
      OP_BEQ:  alu_ctr = 3'b110;
      default: alu_ctr = 3'b010;
    endcase
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL pc=%h %s got=%h exp=%h", dbg_pc, what, got, exp);
    end
  endtask

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
    m = new();
    foreach (kinds[i]) kinds[i] = 0;
    gen_program(prog, 200);
    rst = 1; imem_we = 0;
    foreach (prog[i]) begin
      @(posedge clk);
      imem_we = 1; imem_waddr = 30'(i); imem_wdata = prog[i];
    end
    @(posedge clk);
    imem_we = 0;
    rst = 0;
    #1;
    for (int n = 0; n < RUN_CYCLES; n++) begin
      logic [31:0] ins;
      ins = prog[m.pc[31:2]];
      check("pc", dbg_pc, m.pc);
      check("instr", instr, ins);
      e = m.step(ins);
      case (ins[31:26])
        OP_R:   kinds[0]++;
        OP_ORI: kinds[1]++;
        OP_LW:  kinds[2]++;
        OP_SW:  kinds[3]++;
        OP_BEQ: if (e.taken) kinds[4]++; else kinds[5]++;
        OP_J:   kinds[6]++;
        default: ;
      endcase
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
    foreach (kinds[i]) begin
      checks++;
      if (kinds[i] == 0) begin
        failures++;
        $display("FAIL instruction kind %0d never ran", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
