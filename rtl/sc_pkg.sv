// sc_pkg: types and constants shared by the single-cycle processor.
//
// Instruction word (32 bits, opcode in bits 31:26):
//   ADD  100000 | RS | RT | RD | 00000 | 000000   RS <= RT + RD
//   SUB  100001 | RS | RT | RD | 00000 | 000000   RS <= RT - RD
//   LW   100010 | RS | RT | 00000 | IDX | 000000  RS <= MEM[RT + IDX]
//   SW   100011 | RS | RT | 00000 | IDX | 000000  MEM[RT + IDX] <= RS
//   BEQ  100100 | RS | RT | 00000 | BR  | 000000  if RS == RT: PC <= PC + BR
//   LI   100101 | RS | IMM (21 bits)               RS <= IMM
// RS is bits 25:21, RT 20:16, RD 15:11, IDX/BR 10:6, IMM 20:0.
// Opcodes and field positions follow the instruction set definition; how the
// 5-bit and 21-bit constants are extended to 32 bits is this design's choice
// (IDX and IMM zero-extended, BR sign-extended) and is done in sc_core.
package sc_pkg;

  localparam int unsigned XLEN = 32;   // data and address width
  localparam int unsigned NREG = 32;   // architectural registers
  localparam int unsigned RAW  = 5;    // register address width

  typedef logic [XLEN-1:0] word_t;
  typedef logic [RAW-1:0]  raddr_t;

  typedef enum logic [5:0] {
    OP_ADD = 6'b100000,
    OP_SUB = 6'b100001,
    OP_LW  = 6'b100010,
    OP_SW  = 6'b100011,
    OP_BEQ = 6'b100100,
    OP_LI  = 6'b100101
  } opcode_e;

  // ALU Instr code: 0 selects the adder, 1 the subtractor, 2 the comparator.
  typedef enum logic [1:0] {
    ALU_ADD  = 2'd0,
    ALU_SUB  = 2'd1,
    ALU_CMP  = 2'd2,
    ALU_NONE = 2'd3
  } alu_instr_e;

  // Source of the value written back to register RS.
  typedef enum logic [1:0] {
    WB_ALU = 2'd0,
    WB_MEM = 2'd1,
    WB_IMM = 2'd2
  } wb_sel_e;

  // Control word produced by the control unit for one instruction.
  typedef struct packed {
    logic       reg_write;   // write register RS at the end of the cycle
    logic       rb_is_rs;    // read port B addresses RS (SW, BEQ) instead of RD
    logic       alu_src_idx; // ALU input 2 is the IDX field instead of read port B
    logic       alu_cs;      // ALU chip select
    alu_instr_e alu_instr;   // ALU function
    logic       mem_read;    // OE2 of the data port
    logic       mem_write;   // WE2 of the data port
    logic       branch;      // BEQ: take the branch when Z is 1
    wb_sel_e    wb_sel;      // write-back source
  } ctrl_t;

endpackage
