// sc_system: the complete single-cycle machine, clock module, processor core
// and one dual-port memory holding both program and data.
//
// The clock module drives every clocked part. Memory port 1 is the
// instruction port (never written by the core), port 2 the data port for LW
// and SW; the memory chip select is tied on. One instruction completes per
// clock period (see sc_core for the edge-by-edge schedule). The program and
// initial data are placed in the memory before rst is released, for example
// by a testbench writing the memory array or by $readmemh.
// Outputs expose the clock, PC, current instruction and the register and
// memory writes of each cycle, so a tester can follow execution.
// The clock module is a behavioural model, so this top is a simulation model;
// sc_core with dual_port_mem is the synthesizable part.
module sc_system
  import sc_pkg::*;
#(
  parameter int unsigned MEM_AW = 28   // memory holds 2**MEM_AW words (32 for the full address space)
) (
  input  logic   rst,
  output logic   clk,
  output word_t  pc,
  output word_t  instr,
  output logic   rf_we,
  output raddr_t rf_waddr,
  output word_t  rf_wdata,
  output logic   dmem_we,
  output word_t  dmem_addr,
  output word_t  dmem_wdata
);

  word_t imem_addr, imem_rdata, dmem_rdata;
  logic  imem_oe, dmem_oe;

  clock_gen #(.HALF_PERIOD(5)) u_clk (.clk(clk));

  sc_core u_core (
    .clk        (clk),
    .rst        (rst),
    .imem_addr  (imem_addr),
    .imem_oe    (imem_oe),
    .imem_rdata (imem_rdata),
    .dmem_addr  (dmem_addr),
    .dmem_we    (dmem_we),
    .dmem_oe    (dmem_oe),
    .dmem_wdata (dmem_wdata),
    .dmem_rdata (dmem_rdata),
    .pc         (pc),
    .instr      (instr),
    .rf_we      (rf_we),
    .rf_waddr   (rf_waddr),
    .rf_wdata   (rf_wdata)
  );

  dual_port_mem #(.MEM_AW(MEM_AW)) u_mem (
    .clk       (clk),
    .cs        (1'b1),
    .addr1     (imem_addr),
    .we1       (1'b0),
    .oe1       (imem_oe),
    .data1_in  ('0),
    .data1_out (imem_rdata),
    .addr2     (dmem_addr),
    .we2       (dmem_we),
    .oe2       (dmem_oe),
    .data2_in  (dmem_wdata),
    .data2_out (dmem_rdata)
  );

endmodule
