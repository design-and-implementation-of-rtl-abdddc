// tb_datapath: runs the data path without the control unit.
// This bench plays the controller itself from a table of control words per
// opcode (fetch 0x780, decode 0x700, execute value, 0x760 for a taken
// branch), and checks registers, data memory and flags after the sample
// programs 1, 2 and 3 (values from their published waveforms), a branch
// program, and that the LED/hex outputs show R15.
module tb_datapath;
  import risc_pkg::*;
  logic        clk = 0, rst = 1;
  ctrl_t       ctrl;
  opcode_e     opcode;
  flags_t      flags;
  logic [7:0]  out_port;
  logic [6:0]  hex0, hex1;
  int checks = 0, failures = 0;

  datapath dut (.clk, .rst, .ctrl, .inst_in(16'h0000), .opcode, .flags,
                .out_port, .hex0, .hex1);
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

  task automatic load(input logic [15:0] w[$]);
    rst = 1;
    ctrl = 12'h700;
    @(negedge clk);
    foreach (dut.u_im.mem[i]) dut.u_im.mem[i] = (i < w.size()) ? w[i] : 16'hFFFF;
    foreach (dut.u_dm.mem[i]) dut.u_dm.mem[i] = 8'h00;
    dut.u_dm.mem[0] = 8'h85; dut.u_dm.mem[1] = 8'h94;
    dut.u_dm.mem[2] = 8'h51; dut.u_dm.mem[3] = 8'hFC;
    @(negedge clk);
    rst = 0;
  endtask

  // one instruction, controller played by the bench
  task automatic step();
    logic t;
    ctrl = 12'h780; @(negedge clk);
    ctrl = 12'h700; @(negedge clk);
    ctrl = exec_cv(opcode); @(negedge clk);
    case (opcode)
      OP_BRZ:  t = flags.z;
      OP_BRNZ: t = !flags.z;
      OP_BRGT: t = !flags.n;
      OP_BRLT: t = flags.n;
      default: t = 0;
    endcase
    if (t) begin ctrl = 12'h760; @(negedge clk); end
    ctrl = 12'h700;
  endtask

  task automatic chk(input bit ok, input string w);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask

  initial begin
    ctrl = 12'h700;
    load('{16'h0100, 16'h20FC, 16'h2251, 16'h0301, 16'h24C7, 16'h0503,
           16'h3610, 16'h26BB, 16'h4712, 16'h1101});
    repeat (10) step();
    chk(dut.u_rf.regs[0] == 8'hFC && dut.u_rf.regs[1] == 8'h85 && dut.u_rf.regs[2] == 8'h51 &&
        dut.u_rf.regs[3] == 8'h94 && dut.u_rf.regs[4] == 8'hC7 && dut.u_rf.regs[5] == 8'hFC &&
        dut.u_rf.regs[6] == 8'hBB && dut.u_rf.regs[7] == 8'h34, "sample 1 registers");
    chk(dut.u_dm.mem[1] == 8'h85, "sample 1 store");
    chk(flags == 4'b0001, "sample 1 flags");
    chk(dut.pc == 8'h0A, "sample 1 PC");

    load('{16'h2213, 16'h23A7, 16'hC423, 16'hD523, 16'hE623});
    repeat (5) step();
    chk(dut.u_rf.regs[4] == 8'h03 && dut.u_rf.regs[5] == 8'hB7 && dut.u_rf.regs[6] == 8'hB4,
        "sample 2 registers");

    load('{16'h0101, 16'h0202, 16'hB320, 16'hA410});
    repeat (4) step();
    chk(dut.u_rf.regs[3] == 8'hA8 && dut.u_rf.regs[4] == 8'h29, "sample 3 registers");

    // SUB to zero, BRZ taken over a MOV, then R15 to the outputs
    load('{16'h2105, 16'h4211, 16'h6004, 16'h2F11, 16'h2F5A});
    repeat (4) step();
    chk(dut.pc == 8'h05, "branch taken PC");
    chk(dut.u_rf.regs[15] == 8'h5A, "R15 written after branch");
    @(negedge clk);
    chk(out_port == 8'h5A, "out_port shows R15");
    chk(hex0 == ~7'h77 && hex1 == ~7'h6D, "hex digits 5 and A");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
