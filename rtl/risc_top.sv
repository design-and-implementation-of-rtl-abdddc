// risc_top: 8-bit non-pipelined RISC processor with Harvard memories.
//
// The control unit and the data path side by side: the data path sends the
// opcode (IR[15:12]) and the status flags to the control unit, which returns
// one 12-bit control word per clock cycle. Each instruction is fetched,
// decoded and executed before the next one starts: 3 cycles per instruction,
// 4 for a taken conditional branch (BRZ, BRNZ, BRGT, BRLT).
// Ports: clk, rst (asynchronous, active high), inst_in (instruction memory
// write data), flags {N,Z,V,C}, out_port (LEDs, a copy of R15) and hex0/hex1
// (active-low seven-segment digits of out_port). The port set follows the
// processor's top-level view; the program is placed in the instruction
// memory before reset is released.
module risc_top
  import risc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] inst_in,
  output logic [3:0]  flags,
  output logic [7:0]  out_port,
  output logic [6:0]  hex0,
  output logic [6:0]  hex1
);
  ctrl_t   ctrl;
  opcode_e opcode;
  flags_t  sr_flags;

  control_unit u_cu (.clk, .rst, .opcode, .flags(sr_flags), .ctrl);

  datapath u_dp (
    .clk, .rst, .ctrl, .inst_in, .opcode, .flags(sr_flags),
    .out_port, .hex0, .hex1);

  assign flags = sr_flags;
endmodule
