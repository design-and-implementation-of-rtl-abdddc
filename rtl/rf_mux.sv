// rf_mux: 4-to-1 multiplexer choosing the register-file write data (DBus).
//
// RF_mux = 00 selects MBus (data memory, for LD), 01 selects ALUBus (for the
// ALU instructions), 10 selects IR[7:0] (the immediate of MOV); input 11 is
// not connected and gives zero. Combinational.
module rf_mux
  import risc_pkg::*;
#(
  parameter int unsigned DW = 8
) (
  input  rf_src_e       sel,
  input  logic [DW-1:0] m_bus,
  input  logic [DW-1:0] alu_bus,
  input  logic [DW-1:0] imm,
  output logic [DW-1:0] d_bus
);
  always_comb begin
    unique case (sel)
      RFSRC_MEM: d_bus = m_bus;
      RFSRC_ALU: d_bus = alu_bus;
      RFSRC_IMM: d_bus = imm;
      default:   d_bus = '0;
    endcase
  end
endmodule
