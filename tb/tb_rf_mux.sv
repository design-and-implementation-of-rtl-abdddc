// tb_rf_mux: checks the register write-data multiplexer: 00 MBus,
// 01 ALUBus, 10 immediate, 11 zero.
module tb_rf_mux;
  import risc_pkg::*;
  rf_src_e    sel;
  logic [7:0] m, al, im, d, e;
  int checks = 0, failures = 0;
  rf_mux dut (.sel, .m_bus(m), .alu_bus(al), .imm(im), .d_bus(d));
  initial begin : watchdog
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 800; i++) begin
      sel = rf_src_e'(i % 4); m = 8'($urandom); al = 8'($urandom); im = 8'($urandom);
      #1;
      case (i % 4) 0: e = m; 1: e = al; 2: e = im; default: e = 8'h00; endcase
      checks++;
      if (d !== e) begin failures++; $display("FAIL sel=%0d got %h exp %h", sel, d, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
