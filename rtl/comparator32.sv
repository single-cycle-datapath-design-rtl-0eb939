// comparator32: equality comparator of the ALU. eq is 1 when a equals b, and
// is forced to 0 when the comparator is not enabled. Purely combinational.
module comparator32 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             en,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             eq
);

  assign eq = en && (a == b);

endmodule
