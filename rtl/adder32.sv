// adder32: WIDTH-bit binary adder, sum = a + b (carry out dropped).
//
// Used twice in the instruction fetch unit (PC + 1 and PC + branch offset) and
// as the adder of the ALU. Purely combinational; wrap-around on overflow.
module adder32 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum
);

  assign sum = a + b;

endmodule
