// status_reg: 4-bit status register (SR) holding the flags {N, Z, V, C}.
//
// Loads the ALU flags on the rising clock edge while ld_sr (LdSR) is high,
// which the control unit does in the execute cycle of ADD and SUB only, and
// holds them otherwise; the conditional branches test Z and N from here.
// Reset (asynchronous, active high) clears all flags.
module status_reg
  import risc_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   ld_sr,
  input  flags_t flags_in,
  output flags_t flags
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)        flags <= '0;
    else if (ld_sr) flags <= flags_in;
  end
endmodule
