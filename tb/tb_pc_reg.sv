// tb_pc_reg: checks the program counter: cleared by reset, loads pc_next on
// a clock edge with ld_pc high, holds with ld_pc low.
module tb_pc_reg;
  logic       clk = 0, rst = 1, ld;
  logic [7:0] nxt, pc, model;
  int checks = 0, failures = 0;
  pc_reg dut (.clk, .rst, .ld_pc(ld), .pc_next(nxt), .pc);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    ld = 0; nxt = 8'h55;
    #12;
    checks++; if (pc !== 8'h00) begin failures++; $display("FAIL reset %h", pc); end
    rst = 0; model = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      ld = 1'($urandom); nxt = 8'($urandom);
      @(posedge clk); #1;
      if (ld) model = nxt;
      checks++;
      if (pc !== model) begin failures++; $display("FAIL pc=%h exp %h", pc, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
