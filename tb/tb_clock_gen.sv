// tb_clock_gen: checks that the clock module produces a 50% duty-cycle square
// wave: every high and every low interval lasts HALF_PERIOD time units, the
// output starts low, and the wave keeps running for 20 periods.
module tb_clock_gen;
  localparam int unsigned HP = 5;
  logic clk;
  int checks = 0, failures = 0;

  clock_gen #(.HALF_PERIOD(HP)) dut (.clk(clk));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    time t_rise, t_fall, t_prev;
    #1 check(clk == 1'b0, "clock starts low");
    @(posedge clk); t_prev = $time;
    check(t_prev == HP, "first rising edge after one half period");
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); t_fall = $time;
      check(t_fall - t_prev == HP, $sformatf("high time %0t", t_fall - t_prev));
      @(posedge clk); t_rise = $time;
      check(t_rise - t_fall == HP, $sformatf("low time %0t", t_rise - t_fall));
      t_prev = t_rise;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(HP * 100);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
