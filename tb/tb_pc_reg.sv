// tb_pc_reg: checks that the PC register clears on reset, loads its input on
// the falling clock edge only, and holds its value across the rising edge.
module tb_pc_reg;
  logic        clk = 1'b0, rst;
  logic [31:0] d, q;
  int checks = 0, failures = 0;

  pc_reg #(.WIDTH(32)) dut (.clk(clk), .rst(rst), .d(d), .q(q));

  always #5 clk = ~clk;   // rising edges at 5, 15, ...; falling at 10, 20, ...

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] prev;
    rst = 1'b1; d = 32'h1234_5678;
    @(negedge clk); #1;
    check(q == 0, "reset clears PC");
    rst = 1'b0;
    for (int i = 0; i < 50; i++) begin
      prev = q;
      d = $urandom;
      @(posedge clk); #1;
      check(q == prev, $sformatf("PC changed on rising edge: %h -> %h", prev, q));
      @(negedge clk); #1;
      check(q == d, $sformatf("PC %h, expected %h after falling edge", q, d));
    end
    rst = 1'b1;
    @(negedge clk); #1;
    check(q == 0, "reset clears PC again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
