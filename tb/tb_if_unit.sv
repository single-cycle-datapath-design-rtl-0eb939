// tb_if_unit: checks the fetch unit: PC starts at 0 after reset, drives ADDR1
// with OE1 on, passes the instruction through, advances by 1 on each falling
// edge when PCSrc is 0, jumps to PC + offset (forward and backward) when
// PCSrc is 1, and never changes on a rising edge.
module tb_if_unit;
  import sc_pkg::*;
  logic  clk = 1'b0, rst, pc_src, oe1;
  word_t branch_in, instr_in, addr1, instr_out, pc, exp_pc;
  int checks = 0, failures = 0, taken = 0;

  if_unit dut (.clk(clk), .rst(rst), .branch_in(branch_in), .pc_src(pc_src), .instr_in(instr_in),
               .addr1(addr1), .oe1(oe1), .instr_out(instr_out), .pc(pc));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst = 1; pc_src = 0; branch_in = 0; instr_in = 0;
    @(negedge clk); #1;
    check(pc == 0 && addr1 == 0, "reset PC is 0");
    check(!oe1, "OE1 off in reset");
    rst = 0; exp_pc = 0;
    for (int n = 0; n < 200; n++) begin
      #1;
      check(oe1 && addr1 == pc, "ADDR1 shows PC with OE1 on");
      instr_in = $urandom; #1;
      check(instr_out == instr_in, "instruction passes through");
      pc_src = 1'($urandom % 3 == 0);
      branch_in = word_t'($signed(5'($urandom)));
      @(posedge clk); #1;
      check(pc == exp_pc, "PC held across the rising edge");
      @(negedge clk); #1;
      exp_pc = pc_src ? exp_pc + branch_in : exp_pc + 1;
      if (pc_src) taken++;
      check(pc == exp_pc, $sformatf("PC %h, expected %h", pc, exp_pc));
    end
    check(taken > 0, "branches were taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
