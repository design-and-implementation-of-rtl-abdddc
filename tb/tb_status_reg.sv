// tb_status_reg: checks the status register: reset clears the flags, ld_sr
// loads the ALU flags on a clock edge, otherwise they are held.
module tb_status_reg;
  import risc_pkg::*;
  logic   clk = 0, rst = 1, ld;
  flags_t fin, fl, model;
  int checks = 0, failures = 0;
  status_reg dut (.clk, .rst, .ld_sr(ld), .flags_in(fin), .flags(fl));
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    ld = 1; fin = 4'hF;
    #12;
    checks++; if (fl !== 4'h0) begin failures++; $display("FAIL reset %b", fl); end
    ld = 0; rst = 0; model = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      ld = 1'($urandom); fin = 4'($urandom);
      @(posedge clk); #1;
      if (ld) model = fin;
      checks++;
      if (fl !== model) begin failures++; $display("FAIL fl=%b exp %b", fl, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
