// tb_instr_reg: checks the instruction register: reset to 0000, loads on a
// clock edge with ld_ir high, holds otherwise.
module tb_instr_reg;
  logic        clk = 0, rst = 1, ld;
  logic [15:0] inst, ir, model;
  int checks = 0, failures = 0;
  instr_reg dut (.clk, .rst, .ld_ir(ld), .inst, .ir);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    ld = 1; inst = 16'hABCD;
    #12;
    checks++; if (ir !== 16'h0000) begin failures++; $display("FAIL reset %h", ir); end
    ld = 0; rst = 0; model = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      ld = 1'($urandom); inst = 16'($urandom);
      @(posedge clk); #1;
      if (ld) model = inst;
      checks++;
      if (ir !== model) begin failures++; $display("FAIL ir=%h exp %h", ir, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
