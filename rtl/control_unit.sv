// control_unit: multi-cycle (non-pipelined) controller of the RISC core.
//
// A state machine walks every instruction through its steps one at a time;
// the next instruction is not fetched until the current one has finished:
//   FETCH   IR <= IM[PC]                                   ctrl 0x780
//   DECODE  opcode and register fields settle, nothing is written  0x700
//   EXEC    the instruction's work, and PC <= PC + 1 or the branch target:
//             LD   Ra <= DM[d]                             0x340
//             ST   DM[d] <= Ra                             0x640
//             MOV  Ra <= i                                 0x350
//             ADD/SUB  Ra <= Rb op Rc, SR <= flags         0xB48/0xB49
//             AND/OR/XOR/ROL/ROR  Ra <= result             0x34A..0x34E
//             BRA  PC <= d                                 0x760
//             BRZ/BRNZ/BRGT/BRLT  PC <= PC + 1             0x740
//             NOP  PC <= PC + 1                            0x740
//   BRANCH  taken conditional branch: PC <= d              0x760
// So every instruction takes 3 clock cycles, and a taken conditional branch
// 4. Branch conditions: BRZ Z=1, BRNZ Z=0, BRGT N=0, BRLT N=1.
// The control word (ctrl_t) is registered nowhere: it is decoded from the
// state and the opcode each cycle. The step sequence, the control-word values
// and the 3/4-cycle timing reproduce the published waveforms and cycle counts;
// the DECODE control value (shown blank there) and NOP advancing the PC are
// this design's choices. The instruction memory write enable is never asserted.
// Reset (asynchronous, active high) puts the machine in FETCH.
module control_unit
  import risc_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  opcode_e opcode,
  input  flags_t  flags,
  output ctrl_t   ctrl
);
  typedef enum logic [1:0] {S_FETCH, S_DECODE, S_EXEC, S_BRANCH} state_e;
  state_e state, state_n;

  logic is_cond_branch, cond_taken;

  always_comb begin
    is_cond_branch = 1'b0;
    cond_taken     = 1'b0;
    unique case (opcode)
      OP_BRZ:  begin is_cond_branch = 1'b1; cond_taken =  flags.z; end
      OP_BRNZ: begin is_cond_branch = 1'b1; cond_taken = !flags.z; end
      OP_BRGT: begin is_cond_branch = 1'b1; cond_taken = !flags.n; end
      OP_BRLT: begin is_cond_branch = 1'b1; cond_taken =  flags.n; end
      default: ;
    endcase
  end

  always_comb begin
    unique case (state)
      S_FETCH:  state_n = S_DECODE;
      S_DECODE: state_n = S_EXEC;
      S_EXEC:   state_n = (is_cond_branch && cond_taken) ? S_BRANCH : S_FETCH;
      default:  state_n = S_FETCH;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state <= S_FETCH;
    else     state <= state_n;
  end

  always_comb begin
    ctrl = CTRL_IDLE;
    unique case (state)
      S_FETCH:  ctrl.ld_ir = 1'b1;
      S_DECODE: ;
      S_EXEC: begin
        ctrl.ld_pc = 1'b1;
        unique case (opcode)
          OP_LD:  ctrl.rf_wen_n = 1'b0;
          OP_ST:  ctrl.dm_wen_n = 1'b0;
          OP_MOV: begin
            ctrl.rf_wen_n = 1'b0;
            ctrl.rf_mux   = RFSRC_IMM;
          end
          OP_ADD, OP_SUB: begin
            ctrl.rf_wen_n = 1'b0;
            ctrl.rf_mux   = RFSRC_ALU;
            ctrl.ld_sr    = 1'b1;
            ctrl.f        = (opcode == OP_ADD) ? ALU_ADD : ALU_SUB;
          end
          OP_AND, OP_OR, OP_XOR, OP_ROL, OP_ROR: begin
            ctrl.rf_wen_n = 1'b0;
            ctrl.rf_mux   = RFSRC_ALU;
            unique case (opcode)
              OP_AND:  ctrl.f = ALU_AND;
              OP_OR:   ctrl.f = ALU_OR;
              OP_XOR:  ctrl.f = ALU_XOR;
              OP_ROL:  ctrl.f = ALU_ROL;
              default: ctrl.f = ALU_ROR;
            endcase
          end
          OP_BRA: ctrl.pc_mux = PCSRC_BRANCH;
          default: ;  // conditional branches (first step) and NOP: PC + 1
        endcase
      end
      default: begin  // S_BRANCH
        ctrl.ld_pc  = 1'b1;
        ctrl.pc_mux = PCSRC_BRANCH;
      end
    endcase
  end

  // A register write and a memory write never happen in the same cycle.
  a_one_write: assert property (@(posedge clk) disable iff (rst)
    !(!ctrl.rf_wen_n && !ctrl.dm_wen_n));
endmodule
