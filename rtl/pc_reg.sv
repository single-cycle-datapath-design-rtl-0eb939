// pc_reg: the program counter register.
//
// Loads d on the falling edge of clk, so the new PC is in place half a cycle
// before the next rising edge. rst (active high, sampled on the same falling edge) clears it to 0,
// the address of the first instruction. Loading on the falling edge follows
// the instruction-fetch timing of the design; the reset value and reset style
// are this design's choice.
module pc_reg #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(negedge clk) begin
    if (rst) q <= '0;
    else     q <= d;
  end

endmodule
