// Self-checking testbench for the data memory: random writes and reads
// against a reference array. The read port must show the stored word in
// the same cycle, a write must land at the falling clock edge, WrEn = 0
// must write nothing, and byte-address bits 1:0 must be ignored.
module data_memory_tb;

  localparam int unsigned WORDS = 1024;
  logic        clk = 0;
  logic        wr_en;
  logic [31:0] adr, data_in, data_out;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  data_memory dut (.clk(clk), .wr_en(wr_en), .adr(adr),
                   .data_in(data_in), .data_out(data_out));

  always #5 clk = ~clk;

  task automatic check_read();
    checks++;
    if (data_out !== model[adr[11:2]]) begin
      failures++;
      $display("FAIL adr=%h got=%h exp=%h", adr, data_out, model[adr[11:2]]);
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
    wr_en = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(posedge clk);
      wr_en = 1; adr = 32'(i) << 2; data_in = $urandom; model[i] = data_in;
    end
    for (int n = 0; n < 4000; n++) begin
      @(posedge clk);
      wr_en = ($urandom % 2) == 1;
      adr = $urandom; data_in = $urandom;
      #1 check_read();
      @(negedge clk); #1;
      if (wr_en) model[adr[11:2]] = data_in;
      check_read();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
