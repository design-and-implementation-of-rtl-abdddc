// pc_incr: the incrementer ("+" block) beside the program counter.
//
// Purely combinational: pc_plus1 = pc + 1, wrapping from 255 to 0 because the
// address space is 8 bits. It feeds input 0 of the PC multiplexer, so a
// non-branching instruction continues with the next word.
module pc_incr #(
  parameter int unsigned AW = 8
) (
  input  logic [AW-1:0] pc,
  output logic [AW-1:0] pc_plus1
);
  always_comb pc_plus1 = pc + AW'(1);
endmodule
