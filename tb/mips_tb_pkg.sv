// Testbench helpers for the single-cycle MIPS-subset processor: instruction
// encoders and an instruction-level reference model.
//
// The reference model executes one instruction at a time on its own
// register array, sparse data memory and PC, following the instruction set
// definition (not the RTL's structure), and reports the register and
// memory write the instruction makes and the next PC. Loads and branches
// take effect immediately (no delay slots), as in the processor.
package mips_tb_pkg;

  localparam logic [5:0] OP_R = 6'h00, OP_ORI = 6'h0d, OP_LW = 6'h23,
                         OP_SW = 6'h2b, OP_BEQ = 6'h04, OP_J = 6'h02;
  localparam logic [5:0] F_ADD = 6'h20, F_SUB = 6'h22, F_AND = 6'h24,
                         F_OR = 6'h25, F_SLT = 6'h2a;

  function automatic logic [31:0] enc_r(logic [5:0] fn, logic [4:0] rd,
                                        logic [4:0] rs, logic [4:0] rt);
    return {OP_R, rs, rt, rd, 5'd0, fn};
  endfunction

  function automatic logic [31:0] enc_i(logic [5:0] op, logic [4:0] rt,
                                        logic [4:0] rs, logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction

  function automatic logic [31:0] enc_j(logic [25:0] target);
    return {OP_J, target};
  endfunction

  typedef struct {
    bit          reg_we;
    logic [4:0]  reg_addr;
    logic [31:0] reg_data;
    bit          mem_we;
    logic [31:0] mem_addr;   // byte address, word aligned
    logic [31:0] mem_data;
    logic [31:0] next_pc;
    bit          taken;      // beq taken or j
  } effect_t;

  class isa_model;
    logic [31:0] regs [32];
    logic [31:0] mem [int unsigned];   // word index -> data
    logic [31:0] pc;

    function new();
      foreach (regs[i]) regs[i] = '0;
      pc = '0;
    endfunction

    function logic [31:0] rd_mem(logic [31:0] addr);
      int unsigned w = int'(addr[31:2]);
      if (mem.exists(w)) return mem[w];
      return '0;
    endfunction

    function bit mem_known(logic [31:0] addr);
      return mem.exists(int'(addr[31:2]));
    endfunction

    function effect_t step(logic [31:0] ins);
      effect_t e;
      logic [5:0]  op = ins[31:26];
      logic [4:0]  rs = ins[25:21], rt = ins[20:16], rd = ins[15:11];
      logic [31:0] a = regs[rs], b = regs[rt];
      logic [31:0] sext = {{16{ins[15]}}, ins[15:0]};
      logic [31:0] zext = {16'h0, ins[15:0]};
      e = '{default: '0};
      e.next_pc = pc + 32'd4;
      case (op)
        OP_R: begin
          e.reg_we = 1; e.reg_addr = rd;
          case (ins[5:0])
            F_ADD: e.reg_data = a + b;
            F_SUB: e.reg_data = a - b;
            F_AND: e.reg_data = a & b;
            F_OR:  e.reg_data = a | b;
            F_SLT: e.reg_data = ($signed(a) < $signed(b)) ? 32'd1 : 32'd0;
            default: e.reg_data = 'x;
          endcase
        end
        OP_ORI: begin e.reg_we = 1; e.reg_addr = rt; e.reg_data = a | zext; end
        OP_LW:  begin e.reg_we = 1; e.reg_addr = rt; e.reg_data = rd_mem(a + sext); end
        OP_SW:  begin e.mem_we = 1; e.mem_addr = a + sext; e.mem_data = b; end
        OP_BEQ: if (a == b) begin
                  e.taken = 1; e.next_pc = pc + 32'd4 + (sext << 2);
                end
        OP_J:   begin e.taken = 1; e.next_pc = {pc[31:28], ins[25:0], 2'b00}; end
        default: ;
      endcase
      // commit
      if (e.reg_we && e.reg_addr != 0) regs[e.reg_addr] = e.reg_data;
      if (e.mem_we) mem[int'(e.mem_addr[31:2])] = e.mem_data;
      pc = e.next_pc;
      return e;
    endfunction
  endclass

  // Random test program, word 0 upwards:
  //   prologue  ori $r, $0, random for r = 2..31; ori $1, $0, DATA_BASE;
  //             sw of 16 registers to DATA_BASE + 0..60 so every word a
  //             load can reach holds a known value;
  //   body      body_len random instructions: add, sub, and, or, slt, ori,
  //             lw, sw (base $1, offsets 0..60), beq (forward, one in three
  //             comparing a register with itself), j (forward); loads are
  //             often followed by an instruction reading the loaded
  //             register; some results go to $0;
  //   epilogue  j back to the start of the body.
  // $1 is never a destination, so it stays the data base address.
  localparam logic [15:0] DATA_BASE = 16'h0400;

  function automatic logic [4:0] rand_dst();
    // any register but $1; $0 now and then
    logic [4:0] r;
    if ($urandom % 16 == 0) return 5'd0;
    r = 5'(2 + $urandom % 30);
    return r;
  endfunction

  function automatic void gen_program(output logic [31:0] prog[$], input int body_len);
    int body_start, body_end;
    logic [5:0] fns [5] = '{F_ADD, F_SUB, F_AND, F_OR, F_SLT};
    prog = {};
    for (int r = 2; r < 32; r++)
      prog.push_back(enc_i(OP_ORI, 5'(r), 5'd0, 16'($urandom)));
    prog.push_back(enc_i(OP_ORI, 5'd1, 5'd0, DATA_BASE));
    for (int k = 0; k < 16; k++)
      prog.push_back(enc_i(OP_SW, 5'(2 + k), 5'd1, 16'(4 * k)));
    body_start = prog.size();
    body_end   = body_start + body_len;        // index of the final j
    while (prog.size() < body_end) begin
      int i = prog.size();
      int kind = $urandom % 10;
      logic [4:0] rs = 5'($urandom), rt = 5'($urandom);
      case (kind)
        0, 1: prog.push_back(enc_r(fns[$urandom % 5], rand_dst(), rs, rt));
        2:    prog.push_back(enc_i(OP_ORI, rand_dst(), rs, 16'($urandom)));
        3, 4: begin
                logic [4:0] d = rand_dst();
                prog.push_back(enc_i(OP_LW, d, 5'd1, 16'(4 * ($urandom % 16))));
                if ($urandom % 2 == 0 && prog.size() < body_end)
                  prog.push_back(enc_r(F_ADD, rand_dst(), d, 5'd0));
              end
        5:    prog.push_back(enc_i(OP_SW, rt, 5'd1, 16'(4 * ($urandom % 16))));
        6, 7: begin
                int off = $urandom % 4;
                if (i + 1 + off > body_end) off = body_end - i - 1;
                if ($urandom % 3 == 0) rt = rs;
                prog.push_back(enc_i(OP_BEQ, rt, rs, 16'(off)));
              end
        default: begin
                int tgt = i + 1 + $urandom % 4;
                if (tgt > body_end) tgt = body_end;
                prog.push_back(enc_j(26'(tgt)));
              end
      endcase
    end
    prog.push_back(enc_j(26'(body_start)));
  endfunction

endpackage
