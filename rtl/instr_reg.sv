// instr_reg: 16-bit instruction register.
//
// Captures the instruction memory output on the rising clock edge of the
// fetch cycle (ld_ir = LdIR) and holds it through decode and execute, so the
// opcode, register addresses and immediate/address field stay stable while
// the instruction runs. Reset (asynchronous, active high) clears it to 0x0000.
module instr_reg #(
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          ld_ir,
  input  logic [DW-1:0] inst,
  output logic [DW-1:0] ir
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)        ir <= '0;
    else if (ld_ir) ir <= inst;
  end
endmodule
