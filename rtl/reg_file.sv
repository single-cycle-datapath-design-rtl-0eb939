// reg_file: 32 x 32-bit register file with two read ports and one write port.
//
// Reads are combinational: rdata_a/rdata_b show the registers addressed by
// raddr_a/raddr_b as soon as the instruction fields settle, which in this
// datapath is shortly after the falling edge that loaded the PC. The write
// port stores wdata into register waddr on the FALLING edge of clk when we=1,
// at the end of the instruction cycle, after the load data of the rising edge
// half-cycle is available. All 32 registers are ordinary storage (none is
// hard-wired to zero) and are cleared to 0 by rst (active high, sampled on the falling edge).
// Writing on the falling edge follows the design's register-file timing; the
// combinational read, the reset and the absence of a zero register are this
// design's choices.
module reg_file
  import sc_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  raddr_t raddr_a,
  output word_t  rdata_a,
  input  raddr_t raddr_b,
  output word_t  rdata_b,
  input  logic   we,
  input  raddr_t waddr,
  input  word_t  wdata
);

  word_t regs [NREG];

  always_ff @(negedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata_a = regs[raddr_a];
  assign rdata_b = regs[raddr_b];

endmodule
