// reg_file: register file of sixteen 8-bit registers, R0..R15.
//
// Three asynchronous read ports, addressed by the three 4-bit register fields
// of the instruction: port A (Aaddr = IR[11:8]) drives ABus, the data written
// by ST; ports B (IR[7:4]) and C (IR[3:0]) drive BBus and CBus, the two ALU
// operands. One write port stores DBus into register Aaddr on the rising
// clock edge while rf_wen_n (RFwEn) is low. A fourth, fixed read port
// (out_reg) shows register OUT_REG for the output port; which register feeds
// the board outputs is this design's choice.
// Reset (asynchronous, active high) sets every register to 0xFF, the value
// all registers hold at the start of the published simulations.
module reg_file #(
  parameter int unsigned DW      = 8,
  parameter int unsigned RAW     = 4,
  parameter int unsigned OUT_REG = 15
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           rf_wen_n,
  input  logic [RAW-1:0] a_addr,
  input  logic [RAW-1:0] b_addr,
  input  logic [RAW-1:0] c_addr,
  input  logic [DW-1:0]  d_bus,
  output logic [DW-1:0]  a_bus,
  output logic [DW-1:0]  b_bus,
  output logic [DW-1:0]  c_bus,
  output logic [DW-1:0]  out_reg
);
  logic [DW-1:0] regs [2**RAW];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < 2**RAW; i++) regs[i] <= '1;
    end else if (!rf_wen_n) begin
      regs[a_addr] <= d_bus;
    end
  end

  assign a_bus   = regs[a_addr];
  assign b_bus   = regs[b_addr];
  assign c_bus   = regs[c_addr];
  assign out_reg = regs[OUT_REG];
endmodule
