// tb_risc_top: end-to-end test of the 8-bit non-pipelined RISC processor.
//
// Each program is written into the instruction memory while reset is held,
// the data memory is restored to its initial bytes, and the processor runs.
// An instruction-level reference model inside this bench executes the same
// program and predicts, instruction by instruction, the registers, the data
// memory, the flags and the number of clock cycles (3 per instruction, 4 for a
// taken conditional branch). After the predicted number of cycles the bench
// compares the whole architectural state with the prediction.
// Programs: the five sample programs of the processor's evaluation (with the
// register values and cycle counts seen in their published waveforms checked
// as well), a program that exercises all conditional branches and the output
// port, a binary-counter loop, and random programs. Every mechanism (each
// opcode, taken and not-taken conditional branches, flag loads, memory writes,
// output port updates) is counted and must occur at least once.
module tb_risc_top;
  import risc_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [15:0] inst_in = '0;
  logic [3:0]  flags;
  logic [7:0]  out_port;
  logic [6:0]  hex0, hex1;

  int checks = 0, failures = 0;

  risc_top dut (.clk, .rst, .inst_in, .flags, .out_port, .hex0, .hex1);

  always #10 clk = ~clk;  // 20 ns clock period, as in the published runs

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  logic [15:0] prog [256];
  logic [7:0]  r_rf [16];
  logic [7:0]  r_dm [256];
  logic [3:0]  r_fl;  // {N,Z,V,C}
  logic [7:0]  r_pc;
  int          op_count [16];
  int          n_taken = 0, n_not_taken = 0, n_sr_load = 0, n_dm_write = 0;
  int          n_out_change = 0;

  task automatic ref_reset();
    foreach (r_rf[i]) r_rf[i] = 8'hFF;
    foreach (r_dm[i]) r_dm[i] = 8'h00;
    r_dm[0] = 8'h85; r_dm[1] = 8'h94; r_dm[2] = 8'h51; r_dm[3] = 8'hFC;
    r_fl = 4'h0;
    r_pc = 8'h00;
  endtask

  // Execute one instruction; return its cycle count.
  function automatic int ref_step();
    logic [15:0] w;
    logic [3:0]  op, ra, rb, rc;
    logic [7:0]  d, x, y, res;
    logic [8:0]  s;
    int          cyc;
    w = prog[r_pc];
    op = w[15:12]; ra = w[11:8]; rb = w[7:4]; rc = w[3:0]; d = w[7:0];
    x = r_rf[rb]; y = r_rf[rc];
    cyc = 3;
    op_count[op]++;
    r_pc = r_pc + 8'd1;
    case (op)
      4'h0: r_rf[ra] = r_dm[d];
      4'h1: begin r_dm[d] = r_rf[ra]; n_dm_write++; end
      4'h2: r_rf[ra] = d;
      4'h3, 4'h4: begin
        if (op == 4'h3) s = {1'b0, x} + {1'b0, y};
        else            s = {1'b0, x} + {1'b0, ~y} + 9'd1;
        res = s[7:0];
        r_fl = {res[7], res == 8'h00,
                (op == 4'h3) && (x[7] == y[7]) && (res[7] != x[7]), s[8]};
        r_rf[ra] = res;
        n_sr_load++;
      end
      4'h5: r_pc = d;
      4'h6, 4'h7, 4'h8, 4'h9: begin
        logic t;
        case (op)
          4'h6: t = r_fl[2];
          4'h7: t = !r_fl[2];
          4'h8: t = !r_fl[3];
          default: t = r_fl[3];
        endcase
        if (t) begin r_pc = d; cyc = 4; n_taken++; end
        else n_not_taken++;
      end
      4'hA: r_rf[ra] = {x[6:0], x[7]};
      4'hB: r_rf[ra] = {x[0], x[7:1]};
      4'hC: r_rf[ra] = x & y;
      4'hD: r_rf[ra] = x | y;
      4'hE: r_rf[ra] = x ^ y;
      default: ;
    endcase
    return cyc;
  endfunction

  // ---------------- DUT control ----------------
  task automatic load_and_reset();
    rst = 1'b1;
    @(negedge clk);
    foreach (dut.u_dp.u_im.mem[i]) dut.u_dp.u_im.mem[i] = prog[i];
    foreach (dut.u_dp.u_dm.mem[i]) dut.u_dp.u_dm.mem[i] = 8'h00;
    dut.u_dp.u_dm.mem[0] = 8'h85; dut.u_dp.u_dm.mem[1] = 8'h94;
    dut.u_dp.u_dm.mem[2] = 8'h51; dut.u_dp.u_dm.mem[3] = 8'hFC;
    @(negedge clk);
    rst = 1'b0;
    ref_reset();
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic compare_state(input string name);
    foreach (r_rf[i])
      check(dut.u_dp.u_rf.regs[i] === r_rf[i],
            $sformatf("%s R%0d dut=%h ref=%h", name, i, dut.u_dp.u_rf.regs[i], r_rf[i]));
    for (int i = 0; i < 256; i++)
      if (dut.u_dp.u_dm.mem[i] !== r_dm[i])
        check(1'b0, $sformatf("%s DM[%0d] dut=%h ref=%h", name, i, dut.u_dp.u_dm.mem[i], r_dm[i]));
    checks++;
    check(flags === r_fl, $sformatf("%s flags dut=%b ref=%b", name, flags, r_fl));
    check(dut.u_dp.pc === r_pc, $sformatf("%s PC dut=%h ref=%h", name, dut.u_dp.pc, r_pc));
  endtask

  // Run n_instr instructions; returns the clock cycles the model predicts.
  task automatic run(input string name, input int n_instr, output int cycles);
    logic [7:0] last_out;
    cycles = 0;
    for (int k = 0; k < n_instr; k++) cycles += ref_step();
    last_out = out_port;
    for (int c = 0; c < cycles; c++) begin
      @(posedge clk);
      #1;
      if (out_port !== last_out) begin n_out_change++; last_out = out_port; end
    end
    // registers are written on the last edge; sample after it settles
    compare_state(name);
  endtask

  function automatic logic [6:0] seg(input logic [3:0] v);
    logic [6:0] on [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                            7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};
    return ~on[v];
  endfunction

  task automatic set_prog(input logic [15:0] words[$]);
    foreach (prog[i]) prog[i] = 16'hFFFF;
    foreach (words[i]) prog[i] = words[i];
  endtask

  int cyc;

  initial begin
    foreach (op_count[i]) op_count[i] = 0;

    // Sample program 1: LD, MOV, ADD, SUB, ST (10 instructions)
    set_prog('{16'h0100, 16'h20FC, 16'h2251, 16'h0301, 16'h24C7, 16'h0503,
               16'h3610, 16'h26BB, 16'h4712, 16'h1101});
    load_and_reset();
    run("sample1", 10, cyc);
    check(cyc == 30, $sformatf("sample1 cycles %0d", cyc));
    check(dut.u_dp.u_rf.regs[1] == 8'h85 && dut.u_dp.u_rf.regs[0] == 8'hFC &&
          dut.u_dp.u_rf.regs[2] == 8'h51 && dut.u_dp.u_rf.regs[3] == 8'h94 &&
          dut.u_dp.u_rf.regs[4] == 8'hC7 && dut.u_dp.u_rf.regs[5] == 8'hFC &&
          dut.u_dp.u_rf.regs[6] == 8'hBB && dut.u_dp.u_rf.regs[7] == 8'h34,
          "sample1 published register values");
    check(dut.u_dp.u_dm.mem[1] == 8'h85 && flags == 4'b0001, "sample1 DM[1] and flags");

    // Sample program 2: MOV, AND, OR, XOR (5 instructions, 15 cycles)
    set_prog('{16'h2213, 16'h23A7, 16'hC423, 16'hD523, 16'hE623});
    load_and_reset();
    run("sample2", 5, cyc);
    check(cyc == 15, $sformatf("sample2 cycles %0d", cyc));
    check(dut.u_dp.u_rf.regs[4] == 8'h03 && dut.u_dp.u_rf.regs[5] == 8'hB7 &&
          dut.u_dp.u_rf.regs[6] == 8'hB4, "sample2 published register values");

    // Sample program 3: LD, ROR, ROL (4 instructions, 12 cycles)
    set_prog('{16'h0101, 16'h0202, 16'hB320, 16'hA410});
    load_and_reset();
    run("sample3", 4, cyc);
    check(cyc == 12, $sformatf("sample3 cycles %0d", cyc));
    check(dut.u_dp.u_rf.regs[3] == 8'hA8 && dut.u_dp.u_rf.regs[4] == 8'h29,
          "sample3 published register values");

    // Sample program 4: SUB and BRA over one instruction (18 cycles)
    set_prog('{16'h0100, 16'h2463, 16'h4513, 16'h5005, 16'h2366, 16'h2477, 16'h2588});
    load_and_reset();
    run("sample4", 6, cyc);
    check(cyc == 18, $sformatf("sample4 cycles %0d", cyc));
    check(dut.u_dp.u_rf.regs[4] == 8'h77 && dut.u_dp.u_rf.regs[5] == 8'h88 &&
          dut.u_dp.u_rf.regs[3] == 8'hFF && flags == 4'b1000,
          "sample4 published values");

    // Sample program 5: ADD and a taken BRNZ to address 06 (19 cycles). The
    // two words it skips (04, 05) never execute; 05 is a filler here.
    set_prog('{16'h2213, 16'h23A7, 16'h3323, 16'h7006, 16'h24CC, 16'h24CC, 16'h25DD, 16'h0303});
    load_and_reset();
    run("sample5", 6, cyc);
    check(cyc == 19, $sformatf("sample5 cycles %0d", cyc));
    check(dut.u_dp.u_rf.regs[3] == 8'hFC && dut.u_dp.u_rf.regs[5] == 8'hDD &&
          dut.u_dp.u_rf.regs[4] == 8'hFF && flags == 4'b1000,
          $sformatf("sample5 published values R3=%h R4=%h R5=%h fl=%b", dut.u_dp.u_rf.regs[3], dut.u_dp.u_rf.regs[4], dut.u_dp.u_rf.regs[5], flags));

    // Branch coverage and output port: every conditional branch taken and not
    // taken, NOP, and R15 shown on out_port / hex digits.
    set_prog('{16'h2105,            // 00 MOV R1,#05
               16'h2205,            // 01 MOV R2,#05
               16'h4312,            // 02 SUB R3,R1,R2  -> Z=1, N=0
               16'h7006,            // 03 BRNZ 06 (not taken)
               16'h6006,            // 04 BRZ  06 (taken)
               16'h2FEE,            // 05 skipped
               16'h9009,            // 06 BRLT 09 (not taken)
               16'h8009,            // 07 BRGT 09 (taken)
               16'h2FEE,            // 08 skipped
               16'h4321,            // 09 SUB R3,R2,R1 -> 0, Z=1
               16'h4331,            // 0A SUB R3,R3,R1 -> FB, N=1
               16'h800E,            // 0B BRGT 0E (not taken)
               16'h900E,            // 0C BRLT 0E (taken)
               16'h2FEE,            // 0D skipped
               16'h3331,            // 0E ADD R3,R3,R1 -> 00, Z=1
               16'h6011,            // 0F BRZ 11 (taken)
               16'h2FEE,            // 10 skipped
               16'hF000,            // 11 NOP
               16'h2F3C,            // 12 MOV R15,#3C -> out_port
               16'hF000});          // 13 NOP
    load_and_reset();
    run("branches", 17, cyc);
    check(cyc == 3 * 17 + 4, $sformatf("branches cycles %0d", cyc));
    repeat (2) @(posedge clk);
    #1;
    check(out_port == 8'h3C && hex0 == seg(4'hC) && hex1 == seg(4'h3),
          $sformatf("out_port %h hex1 %b hex0 %b", out_port, hex1, hex0));

    // Binary counter: R15 counts up by one per loop pass and shows on out_port.
    set_prog('{16'h2F00,            // 00 MOV R15,#00
               16'h2101,            // 01 MOV R1,#01
               16'h3FF1,            // 02 ADD R15,R15,R1
               16'h5002});          // 03 BRA 02
    load_and_reset();
    run("counter", 2 + 2 * 20, cyc);
    check(dut.u_dp.u_rf.regs[15] == 8'd20, "counter reaches 20");

    // Random programs compared with the reference model.
    for (int p = 0; p < 30; p++) begin
      foreach (prog[i]) begin
        prog[i] = 16'($urandom);
        // keep branches and memory addresses in a small window
        if (prog[i][15:12] inside {[4'h0:4'h1], [4'h5:4'h9]})
          prog[i][11:0] = {prog[i][11:8], 4'h0, 4'($urandom_range(0, 15))};
      end
      load_and_reset();
      run($sformatf("random%0d", p), 60, cyc);
    end

    // Mechanism coverage
    for (int o = 0; o < 16; o++)
      check(op_count[o] > 0, $sformatf("opcode %h never executed", o));
    check(n_taken > 0, "no taken conditional branch");
    check(n_not_taken > 0, "no not-taken conditional branch");
    check(n_sr_load > 0, "no status register load");
    check(n_dm_write > 0, "no data memory write");
    check(n_out_change > 0, "output port never changed");
    $display("coverage: taken=%0d not_taken=%0d sr_loads=%0d dm_writes=%0d out_changes=%0d",
             n_taken, n_not_taken, n_sr_load, n_dm_write, n_out_change);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
