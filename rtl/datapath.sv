// datapath: the data path of the 8-bit non-pipelined RISC core ("DU").
//
// Connects program counter, incrementer, PC multiplexer, instruction memory,
// instruction register, register file, ALU, status register, data memory, the
// register-file write multiplexer and the board outputs, all steered by the
// control word from the control unit:
//   PC -> IM -> IR; IR[15:12] is the opcode sent to the control unit;
//   IR[11:8], IR[7:4], IR[3:0] address register ports A, B, C;
//   BBus and CBus are the ALU operands A and B; ALUBus and MBus and IR[7:0]
//   feed the write multiplexer whose output, DBus, is written to Ra;
//   ABus (Ra) is the data memory write data, IR[7:0] its address;
//   IR[7:0] is also the branch target at input 1 of the PC multiplexer.
// The ALU flags go to the status register, whose output is the Flags bus.
// inst_in is the instruction memory write data. The structure follows the
// core's block diagram; R15 as the source of the board outputs is this
// design's choice.
module datapath
  import risc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  ctrl_t       ctrl,
  input  logic [15:0] inst_in,
  output opcode_e     opcode,
  output flags_t      flags,
  output logic [7:0]  out_port,
  output logic [6:0]  hex0,
  output logic [6:0]  hex1
);
  logic [ADDR_W-1:0]  pc, pc_plus1, pc_next;
  logic [INSTR_W-1:0] inst, ir;
  logic [DATA_W-1:0]  a_bus, b_bus, c_bus, d_bus, m_bus, alu_bus, r15;
  flags_t             alu_flags;

  pc_reg #(.AW(ADDR_W)) u_pc (
    .clk, .rst, .ld_pc(ctrl.ld_pc), .pc_next, .pc);

  pc_incr #(.AW(ADDR_W)) u_inc (.pc, .pc_plus1);

  pc_mux #(.AW(ADDR_W)) u_pcmux (
    .sel(ctrl.pc_mux), .pc_plus1, .target(ir[7:0]), .pc_next);

  instr_mem #(.AW(ADDR_W), .DW(INSTR_W)) u_im (
    .clk, .im_wen_n(ctrl.im_wen_n), .addr(pc), .inst_in, .inst);

  instr_reg #(.DW(INSTR_W)) u_ir (.clk, .rst, .ld_ir(ctrl.ld_ir), .inst, .ir);

  assign opcode = opcode_e'(ir[15:12]);

  reg_file #(.DW(DATA_W), .RAW(RADDR_W)) u_rf (
    .clk, .rst, .rf_wen_n(ctrl.rf_wen_n),
    .a_addr(ir[11:8]), .b_addr(ir[7:4]), .c_addr(ir[3:0]),
    .d_bus, .a_bus, .b_bus, .c_bus, .out_reg(r15));

  alu #(.DW(DATA_W)) u_alu (
    .f(ctrl.f), .a(b_bus), .b(c_bus), .y(alu_bus), .flags(alu_flags));

  status_reg u_sr (.clk, .rst, .ld_sr(ctrl.ld_sr), .flags_in(alu_flags), .flags);

  data_mem #(.AW(ADDR_W), .DW(DATA_W)) u_dm (
    .clk, .dm_wen_n(ctrl.dm_wen_n), .addr(ir[7:0]), .wdata(a_bus), .rdata(m_bus));

  rf_mux #(.DW(DATA_W)) u_rfmux (
    .sel(ctrl.rf_mux), .m_bus, .alu_bus, .imm(ir[7:0]), .d_bus);

  io_display u_io (.clk, .rst, .value(r15), .out_port, .hex0, .hex1);
endmodule
