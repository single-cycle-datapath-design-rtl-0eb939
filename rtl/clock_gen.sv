// clock_gen: behavioural model of the clock module (not synthesizable).
//
// Produces a free-running square wave with a 50% duty cycle on its single
// output, to be wired to the clock input of every other module. Each period
// the output is low for HALF_PERIOD time units, then high for HALF_PERIOD,
// starting low at time 0, so the first edge is a rising one at HALF_PERIOD.
// A real chip would take this from an oscillator or PLL. The single output
// port, the square wave and the 50% duty cycle follow the specification; the
// 5-unit half period is its suggested value.
// Synthesis tools drop the delays, which leaves nothing meaningful: this
// module exists for simulation only.
module clock_gen #(
  parameter int unsigned HALF_PERIOD = 5   // time units at logic 0 and at logic 1
) (
  output logic clk
);

  always begin
    clk = 1'b0;
    #(HALF_PERIOD);
    clk = 1'b1;
    #(HALF_PERIOD);
  end

endmodule
