// pc_mux: 2-to-1 multiplexer in front of the program counter.
//
// Select 0 (PCSRC_INC) passes the incremented PC, select 1 (PCSRC_BRANCH)
// passes the branch target, which is bits 7:0 of the instruction register.
// Combinational; driven by the PC_mux bit of the control word.
module pc_mux
  import risc_pkg::*;
#(
  parameter int unsigned AW = 8
) (
  input  pc_src_e       sel,
  input  logic [AW-1:0] pc_plus1,
  input  logic [AW-1:0] target,
  output logic [AW-1:0] pc_next
);
  always_comb begin
    unique case (sel)
      PCSRC_BRANCH: pc_next = target;
      default:      pc_next = pc_plus1;
    endcase
  end
endmodule
