// tb_instr_mem: checks the 256 x 16 instruction memory: every word reads
// FFFF (NOP) before it is written, reads are asynchronous, and inst_in is
// stored at addr on the clock edge only while the active-low enable is low.
module tb_instr_mem;
  logic        clk = 0, wen_n;
  logic [7:0]  addr;
  logic [15:0] din, inst;
  logic [15:0] model [256];
  int checks = 0, failures = 0;
  instr_mem dut (.clk, .im_wen_n(wen_n), .addr, .inst_in(din), .inst);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    wen_n = 1; din = 0; addr = 0;
    foreach (model[i]) model[i] = 16'hFFFF;
    #1;
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i); #1;
      checks++;
      if (inst !== 16'hFFFF) begin failures++; $display("FAIL init [%0d] %h", i, inst); end
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      wen_n = 1'($urandom); addr = 8'($urandom_range(0, 31)); din = 16'($urandom);
      #1;
      checks++;
      if (inst !== model[addr]) begin failures++; $display("FAIL read [%h] %h exp %h", addr, inst, model[addr]); end
      @(posedge clk);
      if (!wen_n) model[addr] = din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
