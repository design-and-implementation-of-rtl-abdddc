// tb_data_mem: checks the 256 x 8 data memory: initial bytes 85 94 51 FC at
// addresses 0..3 and zero elsewhere, asynchronous read, write on the clock
// edge only while the active-low enable is low.
module tb_data_mem;
  logic       clk = 0, wen_n;
  logic [7:0] addr, wd, rd;
  logic [7:0] model [256];
  int checks = 0, failures = 0;
  data_mem dut (.clk, .dm_wen_n(wen_n), .addr, .wdata(wd), .rdata(rd));
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    wen_n = 1; wd = 0; addr = 0;
    foreach (model[i]) model[i] = 8'h00;
    model[0] = 8'h85; model[1] = 8'h94; model[2] = 8'h51; model[3] = 8'hFC;
    #1;
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i); #1;
      checks++;
      if (rd !== model[i]) begin failures++; $display("FAIL init [%0d] %h", i, rd); end
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      wen_n = 1'($urandom); addr = 8'($urandom_range(0, 31)); wd = 8'($urandom);
      #1;
      checks++;
      if (rd !== model[addr]) begin failures++; $display("FAIL read [%h] %h exp %h", addr, rd, model[addr]); end
      @(posedge clk);
      if (!wen_n) model[addr] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
