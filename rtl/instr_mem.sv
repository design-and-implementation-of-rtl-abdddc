// instr_mem: instruction memory, 256 words of 16 bits (Harvard organisation:
// separate from the data memory, with its own address and data buses).
//
// Reads are asynchronous: inst = mem[addr] follows the program counter within
// the same cycle, and the instruction register captures it at the end of the
// fetch cycle. One write port stores inst_in at addr on the rising clock edge
// while im_wen_n (IMwEn) is low; the control unit in this core never asserts
// it, so programs are placed in the array before reset is released (by
// INIT_FILE, a $readmemh file, or by a testbench). Without INIT_FILE the array
// starts as all ones, which decodes as NOP.
module instr_mem #(
  parameter int unsigned AW        = 8,
  parameter int unsigned DW        = 16,
  parameter string       INIT_FILE = ""
) (
  input  logic          clk,
  input  logic          im_wen_n,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] inst_in,
  output logic [DW-1:0] inst
);
  logic [DW-1:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '1;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (!im_wen_n) mem[addr] <= inst_in;
  end

  assign inst = mem[addr];
endmodule
