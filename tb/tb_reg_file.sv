// tb_reg_file: checks the 16 x 8 register file against an array model:
// reset value FF in every register, writes through the active-low enable
// to register Aaddr, three independent asynchronous read ports and the R15
// output port.
module tb_reg_file;
  logic       clk = 0, rst = 1, wen_n;
  logic [3:0] aa, ba, ca;
  logic [7:0] d, ab, bb, cb, r15;
  logic [7:0] model [16];
  int checks = 0, failures = 0;
  reg_file dut (.clk, .rst, .rf_wen_n(wen_n), .a_addr(aa), .b_addr(ba), .c_addr(ca),
                .d_bus(d), .a_bus(ab), .b_bus(bb), .c_bus(cb), .out_reg(r15));
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input logic [7:0] got, input logic [7:0] exp, input string w);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", w, got, exp); end
  endtask
  initial begin
    wen_n = 0; d = 8'h00; aa = 0; ba = 0; ca = 0;
    #12;
    foreach (model[i]) model[i] = 8'hFF;
    for (int i = 0; i < 16; i++) begin
      aa = 4'(i); #1; chk(ab, 8'hFF, "reset value");
    end
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      wen_n = 1'($urandom); aa = 4'($urandom); d = 8'($urandom);
      ba = 4'($urandom); ca = 4'($urandom);
      #1;
      chk(ab, model[aa], "port A"); chk(bb, model[ba], "port B"); chk(cb, model[ca], "port C");
      chk(r15, model[15], "R15 port");
      @(posedge clk);
      if (!wen_n) model[aa] = d;
      #1;
      chk(ab, model[aa], "port A after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
