// Self-checking testbench for the instruction memory: loads random words
// through the load port, then reads them back on the fetch port, including
// through an address above the memory size (which must wrap).
module instruction_memory_tb;

  localparam int unsigned WORDS = 2048;
  logic        clk = 0;
  logic [29:0] addr, waddr;
  logic [31:0] instr, wdata;
  logic        we;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  instruction_memory dut (.clk(clk), .addr(addr), .instr(instr),
                          .we(we), .waddr(waddr), .wdata(wdata));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(posedge clk);
      we = 1; waddr = 30'(i); wdata = $urandom; model[i] = wdata;
    end
    @(posedge clk); we = 0;
    // a write with we = 0 must not change anything
    waddr = 30'd5; wdata = ~model[5];
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      addr = 30'($urandom);
      #1;
      checks++;
      if (instr !== model[addr % WORDS]) begin
        failures++;
        $display("FAIL addr=%h got=%h exp=%h", addr, instr, model[addr % WORDS]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
