// mux2: WIDTH-bit 2-to-1 multiplexer, y = sel ? d1 : d0. Combinational.
// Used for the PC source choice and for the operand and write-back choices of
// the datapath.
module mux2 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  output logic [WIDTH-1:0] y
);

  assign y = sel ? d1 : d0;

endmodule
