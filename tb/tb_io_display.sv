// tb_io_display: checks the board outputs: out_port is cleared by reset and
// follows the input one clock later; hex0/hex1 show its low and high nibble
// with active-low segments {g,f,e,d,c,b,a}, compared with a digit table here.
module tb_io_display;
  logic       clk = 0, rst = 1;
  logic [7:0] v, op;
  logic [6:0] h0, h1;
  logic [6:0] seg [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                           7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};
  int checks = 0, failures = 0;
  io_display dut (.clk, .rst, .value(v), .out_port(op), .hex0(h0), .hex1(h1));
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    v = 8'hFF;
    #12;
    checks++;
    if (op !== 8'h00 || h0 !== ~seg[0] || h1 !== ~seg[0]) begin
      failures++; $display("FAIL reset %h", op);
    end
    rst = 0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      v = (i < 256) ? 8'(i) : 8'($urandom);
      @(posedge clk); #1;
      checks++;
      if (op !== v || h0 !== ~seg[v[3:0]] || h1 !== ~seg[v[7:4]]) begin
        failures++; $display("FAIL v=%h out=%h h1=%b h0=%b", v, op, h1, h0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
