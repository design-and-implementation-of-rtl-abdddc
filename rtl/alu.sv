// alu: 8-bit arithmetic, logic and rotate unit.
//
// Combinational. Operand a comes from BBus (register Rb), operand b from CBus
// (register Rc). The function select f (F[2:0]) picks:
//   ADD a+b, SUB a-b, AND, OR, XOR, ROL (a rotated left by one bit),
//   ROR (a rotated right by one bit); code 7 is unused and passes b.
// flags = {N, Z, V, C} of the result: N is result bit 7, Z is set for a zero
// result, C is the carry out of the adder (for SUB the adder computes
// a + ~b + 1, so C = 1 means "no borrow"), V is the signed overflow of ADD.
// The status register keeps the flags only for ADD and SUB.
// The operations and N/Z follow the instruction set; the flag order, the carry
// convention and V are this design's reading of the flag values in the
// published waveforms (0x85+0xFC -> 1001, 0x85-0x51 -> 0001,
// 0x85-0xFF -> 1000, 0x13+0xA7 -> 1000), which never show V set by SUB.
module alu
  import risc_pkg::*;
#(
  parameter int unsigned DW = 8
) (
  input  alu_op_e       f,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  output logic [DW-1:0] y,
  output flags_t        flags
);
  logic [DW:0] sum;

  always_comb begin
    sum       = '0;
    flags.c   = 1'b0;
    flags.v   = 1'b0;
    unique case (f)
      ALU_ADD: begin
        sum     = {1'b0, a} + {1'b0, b};
        y       = sum[DW-1:0];
        flags.c = sum[DW];
        flags.v = (a[DW-1] == b[DW-1]) && (y[DW-1] != a[DW-1]);
      end
      ALU_SUB: begin
        sum     = {1'b0, a} + {1'b0, ~b} + (DW+1)'(1);
        y       = sum[DW-1:0];
        flags.c = sum[DW];
      end
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_ROL: y = {a[DW-2:0], a[DW-1]};
      ALU_ROR: y = {a[0], a[DW-1:1]};
      default: y = b;
    endcase
    flags.n = y[DW-1];
    flags.z = (y == '0);
  end
endmodule
