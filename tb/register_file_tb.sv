// Self-checking testbench for the register file.
//
// Writes every register, then runs random cycles of one write and two
// reads against a reference array. Checks that a write lands at the
// falling clock edge (and not before), that RegWr = 0 writes nothing and
// that register 0 stays zero.
module register_file_tb;

  logic        clk = 0;
  logic        reg_wr;
  logic [4:0]  rw, ra, rb;
  logic [31:0] bus_w, bus_a, bus_b;
  logic [31:0] model [32];
  int checks = 0, failures = 0;
  int r0_writes = 0;

  register_file dut (.clk(clk), .reg_wr(reg_wr), .rw(rw), .bus_w(bus_w),
                     .ra(ra), .rb(rb), .bus_a(bus_a), .bus_b(bus_b));

  always #5 clk = ~clk;

  task automatic check_read();
    checks++;
    if (bus_a !== model[ra] || bus_b !== model[rb]) begin
      failures++;
      $display("FAIL ra=%0d a=%h exp %h  rb=%0d b=%h exp %h",
               ra, bus_a, model[ra], rb, bus_b, model[rb]);
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
    foreach (model[i]) model[i] = '0;
    // initial fill, driven after a rising edge, taking effect at the next falling edge
    for (int i = 0; i < 32; i++) begin
      @(posedge clk);
      reg_wr = 1; rw = 5'(i); bus_w = $urandom; ra = 5'(i); rb = 0;
      @(negedge clk); #1;
      if (i != 0) model[i] = bus_w;
      check_read();
    end
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk);
      reg_wr = ($urandom % 3) != 0;
      rw = 5'($urandom); bus_w = $urandom;
      ra = ($urandom % 2) ? rw : 5'($urandom); rb = 5'($urandom);
      #1 check_read();                 // old contents before the edge
      @(negedge clk); #1;
      if (reg_wr && rw != 0) model[rw] = bus_w;
      if (reg_wr && rw == 0) r0_writes++;
      check_read();                    // new contents after the edge
    end
    checks++;
    if (r0_writes == 0) begin failures++; $display("FAIL no write to r0 tried"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
