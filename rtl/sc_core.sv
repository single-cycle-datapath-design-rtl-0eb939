// sc_core: single-cycle processor core for the six-instruction set of sc_pkg.
//
// Every instruction completes in one clock cycle. A cycle starts at a FALLING
// edge of clk, when the PC (and the register written by the previous
// instruction) takes its new value, and proceeds as follows:
//   low half   the PC drives the instruction port; the instruction decodes;
//              the register file is read (port A: RT, port B: RD or RS); the
//              ALU forms the sum, difference or equality; the branch target
//              PC + BR and the data address RT + IDX settle.
//   rising     a store (SW) writes RS into the data memory.
//   high half  a load's data (LW) comes back from the data port.
//   falling    the register file writes RS (ADD, SUB, LW, LI) and the PC loads
//              PC + 1 or, for a taken BEQ, PC + BR. The next cycle begins.
// The core connects to a dual-port memory: port 1 (imem_*) is read-only for
// instructions, port 2 (dmem_*) serves LW and SW. Both memory reads must be
// combinational for this schedule. rst (active high) clears PC and registers
// and blocks stores; release it just after a falling edge.
// Restriction: because instruction and data share one memory and the store
// lands in mid-cycle, a store that overwrites the word of the store
// instruction itself changes the instruction for the rest of its own cycle.
// Programs must not do that; any other self-modifying code works (the new
// word is fetched the next time it is executed).
// Constants: IDX (bits 10:6) and IMM (bits 20:0) are zero-extended, BR
// (bits 10:6) is sign-extended so a branch can go backwards by up to 16 words.
// The register roles, opcodes and the use of both clock edges follow the
// specification; the exact edge of each action, the constant extensions and
// undefined opcodes acting as no-operations are this design's choices.
module sc_core
  import sc_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  // instruction port (memory port 1)
  output word_t imem_addr,
  output logic  imem_oe,
  input  word_t imem_rdata,
  // data port (memory port 2)
  output word_t dmem_addr,
  output logic  dmem_we,
  output logic  dmem_oe,
  output word_t dmem_wdata,
  input  word_t dmem_rdata,
  // observation
  output word_t pc,
  output word_t instr,
  output logic  rf_we,
  output raddr_t rf_waddr,
  output word_t rf_wdata
);

  ctrl_t  ctrl;
  logic   valid;
  raddr_t f_rs, f_rt, f_rd, rb_addr;
  word_t  idx_zext, br_sext, imm_zext;
  word_t  rdata_a, rdata_b, alu_in2, alu_result, wb_alu_mem, wb_data;
  logic   z, pc_src;

  // ---------------------------------------------------------------- fetch
  if_unit u_if (
    .clk       (clk),
    .rst       (rst),
    .branch_in (br_sext),
    .pc_src    (pc_src),
    .instr_in  (imem_rdata),
    .addr1     (imem_addr),
    .oe1       (imem_oe),
    .instr_out (instr),
    .pc        (pc)
  );

  // --------------------------------------------------------------- decode
  assign f_rs     = instr[25:21];
  assign f_rt     = instr[20:16];
  assign f_rd     = instr[15:11];
  assign idx_zext = word_t'(instr[10:6]);
  assign br_sext  = {{(XLEN-5){instr[10]}}, instr[10:6]};
  assign imm_zext = word_t'(instr[20:0]);

  control_unit u_ctrl (
    .opcode (instr[31:26]),
    .ctrl   (ctrl),
    .valid  (valid)
  );

  mux2 #(.WIDTH(RAW)) u_rb_mux (.sel(ctrl.rb_is_rs), .d0(f_rd), .d1(f_rs), .y(rb_addr));

  reg_file u_rf (
    .clk     (clk),
    .rst     (rst),
    .raddr_a (f_rt),
    .rdata_a (rdata_a),
    .raddr_b (rb_addr),
    .rdata_b (rdata_b),
    .we      (rf_we),
    .waddr   (f_rs),
    .wdata   (wb_data)
  );

  // -------------------------------------------------------------- execute
  mux2 #(.WIDTH(XLEN)) u_src_mux (.sel(ctrl.alu_src_idx), .d0(rdata_b), .d1(idx_zext), .y(alu_in2));

  alu u_alu (
    .cs        (ctrl.alu_cs),
    .alu_instr (ctrl.alu_instr),
    .in1       (rdata_a),
    .in2       (alu_in2),
    .result    (alu_result),
    .z         (z)
  );

  assign pc_src = ctrl.branch && z;

  // --------------------------------------------------------------- memory
  assign dmem_addr  = alu_result;
  assign dmem_we    = ctrl.mem_write && !rst;
  assign dmem_oe    = ctrl.mem_read;
  assign dmem_wdata = rdata_b;

  // ----------------------------------------------------------- write back
  mux2 #(.WIDTH(XLEN)) u_wb_mem_mux (.sel(ctrl.wb_sel == WB_MEM), .d0(alu_result), .d1(dmem_rdata), .y(wb_alu_mem));
  mux2 #(.WIDTH(XLEN)) u_wb_imm_mux (.sel(ctrl.wb_sel == WB_IMM), .d0(wb_alu_mem), .d1(imm_zext),   .y(wb_data));

  assign rf_we    = ctrl.reg_write && valid && !rst;
  assign rf_waddr = f_rs;
  assign rf_wdata = wb_data;

  // A data access is either a load or a store, never both.
  a_mem_rw_exclusive: assert property (@(posedge clk) disable iff (rst) !(dmem_we && dmem_oe))
    else $error("sc_core: load and store in the same cycle");
  // Only BEQ uses the comparator, and it writes no register.
  a_cmp_no_write: assert property (@(negedge clk) disable iff (rst) !(ctrl.alu_instr == ALU_CMP && rf_we))
    else $error("sc_core: compare instruction writing a register");

endmodule
