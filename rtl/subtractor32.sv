// subtractor32: WIDTH-bit binary subtractor, diff = a - b (two's complement,
// borrow dropped). The subtractor unit of the ALU. Purely combinational.
module subtractor32 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] diff
);

  assign diff = a - b;

endmodule
