// if_unit: instruction fetch unit, the PC register, two adders and a 2x1 mux.
//
// The PC drives ADDR1 of the memory with OE1 held at 1 (0 during reset), and
// the word read on DATA1 (instr_in) is passed on as instr_out. The first adder
// forms PC + 1, the address of the next word, because the memory is word
// addressable. The second adder forms PC + branch_in, the branch target
// relative to the address of the branch itself. pc_src (1 for a taken branch)
// selects the target, otherwise PC + 1, and the PC loads the selected value on
// the falling edge of clk that ends the instruction cycle.
// Timing: the PC changes on the falling edge; the instruction is valid for
// the rest of the cycle; branch_in and pc_src, computed from that instruction,
// must be settled by the next falling edge.
// The structure (PC, two adders, mux, falling-edge PC update) follows the
// specification. The increment of 1 rather than 4 is taken from the drawn
// constant and the word addressing; reset to address 0 is this design's choice.
module if_unit
  import sc_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  word_t branch_in,   // sign-extended branch offset
  input  logic  pc_src,      // 1: load PC + branch_in, 0: load PC + 1
  input  word_t instr_in,    // DATA1 of the memory
  output word_t addr1,       // ADDR1 of the memory
  output logic  oe1,         // OE1 of the memory
  output word_t instr_out,
  output word_t pc
);

  word_t pc_plus1, pc_target, pc_next;

  pc_reg  #(.WIDTH(XLEN)) u_pc   (.clk(clk), .rst(rst), .d(pc_next), .q(pc));
  adder32 #(.WIDTH(XLEN)) u_inc  (.a(pc), .b(word_t'(1)), .sum(pc_plus1));
  adder32 #(.WIDTH(XLEN)) u_btgt (.a(pc), .b(branch_in), .sum(pc_target));
  mux2    #(.WIDTH(XLEN)) u_mux  (.sel(pc_src), .d0(pc_plus1), .d1(pc_target), .y(pc_next));

  assign addr1     = pc;
  assign oe1       = !rst;
  assign instr_out = instr_in;

endmodule
