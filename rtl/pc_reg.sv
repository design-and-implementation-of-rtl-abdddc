// pc_reg: program counter of the non-pipelined RISC core.
//
// An 8-bit register holding the address of the next instruction in the
// 256-word instruction memory. It loads pc_next on the rising clock edge when
// the control unit raises ld_pc (LdPC), and holds otherwise. The loaded value
// comes from the PC multiplexer (PC + 1 or a branch target).
// Reset is asynchronous and active high and clears the PC to address 0 so
// that execution starts at the first instruction word; the reset polarity and
// style are this design's choice.
module pc_reg #(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          ld_pc,
  input  logic [AW-1:0] pc_next,
  output logic [AW-1:0] pc
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)        pc <= '0;
    else if (ld_pc) pc <= pc_next;
  end
endmodule
