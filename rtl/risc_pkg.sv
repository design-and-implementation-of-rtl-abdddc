// risc_pkg: types and constants shared by the 8-bit non-pipelined RISC core.
//
// The machine has 16-bit instructions in three formats (bits 15:12 always the
// opcode):
//   R-type  {op, Ra[11:8], Rb[7:4], Rc[3:0]}   ADD SUB AND OR XOR ROL ROR
//   I-type  {op, Ra[11:8], d/i[7:0]}           LD ST MOV
//   J-type  {op, d[11:0]}                      BRA BRZ BRNZ BRGT BRLT
// The opcode numbering below is the order of the instruction-set table, LD = 0
// to NOP = 15; it reproduces every instruction word of the published sample
// programs. The control word layout (ctrl_t) is chosen so that its hex value
// equals the control-vector values shown in those programs' waveforms
// (0x780 fetch, 0x340 LD, 0x350 MOV, 0x640 ST, 0xB48 ADD, 0x760 BRA ...).
package risc_pkg;

  localparam int unsigned DATA_W  = 8;   // data path width
  localparam int unsigned INSTR_W = 16;  // instruction width
  localparam int unsigned ADDR_W  = 8;   // instruction and data address width
  localparam int unsigned RADDR_W = 4;   // register address width (16 registers)

  typedef enum logic [3:0] {
    OP_LD   = 4'h0,
    OP_ST   = 4'h1,
    OP_MOV  = 4'h2,
    OP_ADD  = 4'h3,
    OP_SUB  = 4'h4,
    OP_BRA  = 4'h5,
    OP_BRZ  = 4'h6,
    OP_BRNZ = 4'h7,
    OP_BRGT = 4'h8,
    OP_BRLT = 4'h9,
    OP_ROL  = 4'hA,
    OP_ROR  = 4'hB,
    OP_AND  = 4'hC,
    OP_OR   = 4'hD,
    OP_XOR  = 4'hE,
    OP_NOP  = 4'hF
  } opcode_e;

  // ALU function select F[2:0].
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_AND = 3'd2,
    ALU_OR  = 3'd3,
    ALU_XOR = 3'd4,
    ALU_ROL = 3'd5,
    ALU_ROR = 3'd6,
    ALU_PSB = 3'd7   // spare code: passes operand B
  } alu_op_e;

  // Register-file write-data source (RF_mux).
  typedef enum logic [1:0] {
    RFSRC_MEM = 2'b00,  // MBus, data memory read data
    RFSRC_ALU = 2'b01,  // ALUBus
    RFSRC_IMM = 2'b10,  // IR[7:0]
    RFSRC_NC  = 2'b11   // not connected, reads as zero
  } rf_src_e;

  // PC source (PC_mux).
  typedef enum logic {
    PCSRC_INC    = 1'b0, // PC + 1
    PCSRC_BRANCH = 1'b1  // IR[7:0]
  } pc_src_e;

  // Status flags, in the bit order of the 4-bit Flags bus: {N, Z, V, C}.
  typedef struct packed {
    logic n;  // bit 3: result bit 7
    logic z;  // bit 2: result is zero
    logic v;  // bit 1: signed overflow of an addition
    logic c;  // bit 0: carry out (no-borrow for subtraction)
  } flags_t;

  // Control word driven by the control unit. Write enables are active low.
  typedef struct packed {
    logic    ld_sr;     // bit 11
    logic    rf_wen_n;  // bit 10
    logic    im_wen_n;  // bit 9
    logic    dm_wen_n;  // bit 8
    logic    ld_ir;     // bit 7
    logic    ld_pc;     // bit 6
    pc_src_e pc_mux;    // bit 5
    rf_src_e rf_mux;    // bits 4:3
    alu_op_e f;         // bits 2:0
  } ctrl_t;

  // Control word with every action off (all enables inactive).
  localparam ctrl_t CTRL_IDLE = '{ld_sr: 1'b0, rf_wen_n: 1'b1, im_wen_n: 1'b1,
                                  dm_wen_n: 1'b1, ld_ir: 1'b0, ld_pc: 1'b0,
                                  pc_mux: PCSRC_INC, rf_mux: RFSRC_MEM, f: ALU_ADD};

endpackage
