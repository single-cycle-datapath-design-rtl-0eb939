// alu: the execute unit, an adder, a subtractor and an equality comparator
// behind a decoder.
//
// The 2-bit alu_instr code is decoded into one enable per unit: 0 enables the
// adder, 1 the subtractor, 2 the comparator (3 enables none). A unit that is
// not enabled outputs 0, so the adder and subtractor results can simply be
// ORed to form the 32-bit result. z is the comparator output: 1 when in1
// equals in2 (and the comparator is enabled), used by BEQ. With the chip
// select cs at 0 every unit is off and both outputs are 0. Purely
// combinational.
// The three units, the decoder codes, the OR of the two arithmetic results and
// the Z output follow the specification; gating units by forcing their outputs
// to 0 is this design's way of making the OR select one of them.
module alu
  import sc_pkg::*;
(
  input  logic       cs,
  input  alu_instr_e alu_instr,
  input  word_t      in1,
  input  word_t      in2,
  output word_t      result,
  output logic       z
);

  logic  en_add, en_sub, en_cmp;
  word_t sum, diff;

  // decoder
  always_comb begin
    en_add = 1'b0;
    en_sub = 1'b0;
    en_cmp = 1'b0;
    if (cs) begin
      unique case (alu_instr)
        ALU_ADD: en_add = 1'b1;
        ALU_SUB: en_sub = 1'b1;
        ALU_CMP: en_cmp = 1'b1;
        default: ;
      endcase
    end
  end

  adder32      #(.WIDTH(XLEN)) u_add (.a(in1), .b(in2), .sum(sum));
  subtractor32 #(.WIDTH(XLEN)) u_sub (.a(in1), .b(in2), .diff(diff));
  comparator32 #(.WIDTH(XLEN)) u_cmp (.en(en_cmp), .a(in1), .b(in2), .eq(z));

  assign result = (en_add ? sum : '0) | (en_sub ? diff : '0);

endmodule
