// tb_control_unit: checks the control unit cycle by cycle.
// For every opcode and every flag combination it compares the control word of
// each cycle with the expected sequence: fetch 0x780, decode 0x700, then the
// execute value of the instruction (0x340 LD, 0x640 ST, 0x350 MOV, 0xB48 ADD,
// 0xB49 SUB, 0x34A..0x34E AND OR XOR ROL ROR, 0x760 BRA, 0x740 conditional
// branch and NOP), plus 0x760 in a fourth cycle for a taken conditional
// branch, and that the next fetch follows. Branch decisions are worked out
// here from Z and N.
module tb_control_unit;
  import risc_pkg::*;
  logic    clk = 0, rst = 1;
  opcode_e opc;
  flags_t  fl;
  ctrl_t   ctrl;
  int checks = 0, failures = 0;
  control_unit dut (.clk, .rst, .opcode(opc), .flags(fl), .ctrl);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [11:0] exec_cv(input logic [3:0] op);
    case (op)
      4'h0: return 12'h340;  4'h1: return 12'h640;  4'h2: return 12'h350;
      4'h3: return 12'hB48;  4'h4: return 12'hB49;  4'h5: return 12'h760;
      4'hA: return 12'h34D;  4'hB: return 12'h34E;  4'hC: return 12'h34A;
      4'hD: return 12'h34B;  4'hE: return 12'h34C;
      default: return 12'h740;
    endcase
  endfunction

  function automatic bit taken(input logic [3:0] op, input logic [3:0] f);
    case (op)
      4'h6: return f[2];
      4'h7: return !f[2];
      4'h8: return !f[3];
      4'h9: return f[3];
      default: return 0;
    endcase
  endfunction

  task automatic expect_cv(input logic [11:0] cv, input string w);
    checks++;
    if (ctrl !== cv) begin failures++; $display("FAIL %s: ctrl=%h exp %h", w, ctrl, cv); end
  endtask

  initial begin
    opc = OP_NOP; fl = '0;
    #12;
    @(posedge clk);
    #1 rst = 0;
    for (int rep = 0; rep < 3; rep++)
      for (int o = 0; o < 16; o++)
        for (int f = 0; f < 16; f++) begin
          int ncyc;
          @(negedge clk);
          // cycle 1: fetch (opcode of the previous instruction still in IR)
          opc = opcode_e'(4'($urandom)); fl = flags_t'(4'(f));
          expect_cv(12'h780, "fetch");
          @(negedge clk);
          opc = opcode_e'(4'(o));
          expect_cv(12'h700, "decode");
          @(negedge clk);
          expect_cv(exec_cv(4'(o)), $sformatf("execute op %h", o));
          ncyc = 3;
          if (taken(4'(o), 4'(f))) begin
            @(negedge clk);
            expect_cv(12'h760, $sformatf("branch step op %h flags %b", o, f));
            ncyc = 4;
          end
          checks++;
          if (ncyc != (taken(4'(o), 4'(f)) ? 4 : 3)) failures++;
        end
    @(negedge clk);
    expect_cv(12'h780, "final fetch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
