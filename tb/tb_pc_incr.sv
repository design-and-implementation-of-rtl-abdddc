// tb_pc_incr: checks pc_plus1 = pc + 1 (mod 256) for every address.
module tb_pc_incr;
  logic [7:0] pc, pc_plus1;
  int checks = 0, failures = 0;
  pc_incr dut (.pc, .pc_plus1);
  initial begin : watchdog
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 256; i++) begin
      pc = 8'(i); #1;
      checks++;
      if (pc_plus1 !== 8'((i + 1) % 256)) begin
        failures++; $display("FAIL pc=%h got %h", pc, pc_plus1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
