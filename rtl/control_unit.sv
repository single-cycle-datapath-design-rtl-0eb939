// control_unit: main control and ALU control, decoding the 6-bit opcode.
//
// Combinational. For each opcode it produces the control word ctrl_t:
//   ADD : write RS <= ALU, ALU add of (RT, RD)
//   SUB : write RS <= ALU, ALU subtract of (RT, RD)
//   LW  : write RS <= memory, ALU add of (RT, IDX), memory read (OE2)
//   SW  : ALU add of (RT, IDX), memory write (WE2) of RS
//   BEQ : ALU compare of (RT, RS), branch when Z
//   LI  : write RS <= IMM, ALU off
// Any other opcode does nothing but advance the PC (valid = 0).
// The ALU Instr codes (0 add, 1 subtract, 2 compare) follow the
// specification; the rest of the control word is this design's encoding.
module control_unit
  import sc_pkg::*;
(
  input  logic [5:0] opcode,
  output ctrl_t      ctrl,
  output logic       valid
);

  always_comb begin
    ctrl  = '{default: '0, alu_instr: ALU_NONE, wb_sel: WB_ALU};
    valid = 1'b1;
    unique case (opcode)
      OP_ADD: begin
        ctrl.reg_write = 1'b1;
        ctrl.alu_cs    = 1'b1;
        ctrl.alu_instr = ALU_ADD;
      end
      OP_SUB: begin
        ctrl.reg_write = 1'b1;
        ctrl.alu_cs    = 1'b1;
        ctrl.alu_instr = ALU_SUB;
      end
      OP_LW: begin
        ctrl.reg_write   = 1'b1;
        ctrl.alu_src_idx = 1'b1;
        ctrl.alu_cs      = 1'b1;
        ctrl.alu_instr   = ALU_ADD;
        ctrl.mem_read    = 1'b1;
        ctrl.wb_sel      = WB_MEM;
      end
      OP_SW: begin
        ctrl.rb_is_rs    = 1'b1;
        ctrl.alu_src_idx = 1'b1;
        ctrl.alu_cs      = 1'b1;
        ctrl.alu_instr   = ALU_ADD;
        ctrl.mem_write   = 1'b1;
      end
      OP_BEQ: begin
        ctrl.rb_is_rs  = 1'b1;
        ctrl.alu_cs    = 1'b1;
        ctrl.alu_instr = ALU_CMP;
        ctrl.branch    = 1'b1;
      end
      OP_LI: begin
        ctrl.reg_write = 1'b1;
        ctrl.wb_sel    = WB_IMM;
      end
      default: valid = 1'b0;
    endcase
  end

endmodule
