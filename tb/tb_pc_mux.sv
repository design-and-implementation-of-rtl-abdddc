// tb_pc_mux: checks that select 0 passes PC+1 and select 1 the branch target.
module tb_pc_mux;
  import risc_pkg::*;
  pc_src_e    sel;
  logic [7:0] inc, tgt, nxt;
  int checks = 0, failures = 0;
  pc_mux dut (.sel, .pc_plus1(inc), .target(tgt), .pc_next(nxt));
  initial begin : watchdog
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 500; i++) begin
      sel = pc_src_e'(i % 2); inc = 8'($urandom); tgt = 8'($urandom);
      #1;
      checks++;
      if (nxt !== (sel == PCSRC_BRANCH ? tgt : inc)) begin
        failures++; $display("FAIL sel=%0d inc=%h tgt=%h got %h", sel, inc, tgt, nxt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
