// tb_control_unit: checks the control word for each of the six opcodes
// against a table written out here, and that all other opcodes are flagged
// invalid and enable no register or memory write and no branch.
module tb_control_unit;
  import sc_pkg::*;
  logic [5:0] opcode;
  ctrl_t      ctrl;
  logic       valid;
  int checks = 0, failures = 0;

  control_unit dut (.opcode(opcode), .ctrl(ctrl), .valid(valid));

  // expected: reg_write rb_is_rs alu_src_idx alu_cs alu_instr mem_read mem_write branch wb_sel
  task automatic expect_ctrl(input logic [5:0] op, input string name, input logic rw, input logic rbrs,
                             input logic src, input logic acs, input logic [1:0] ai,
                             input logic mr, input logic mw, input logic br, input logic [1:0] wb);
    opcode = op; #1;
    checks++;
    if (!valid || ctrl.reg_write !== rw || ctrl.rb_is_rs !== rbrs || ctrl.alu_src_idx !== src ||
        ctrl.alu_cs !== acs || (acs && ctrl.alu_instr !== ai) || ctrl.mem_read !== mr ||
        ctrl.mem_write !== mw || ctrl.branch !== br || (rw && ctrl.wb_sel !== wb)) begin
      failures++;
      $display("FAIL: %s control word %p", name, ctrl);
    end
  endtask

  initial begin
    //                            rw rbrs src acs ai  mr mw br wb
    expect_ctrl(6'b100000, "ADD", 1, 0,   0,  1,  0,  0, 0, 0, 0);
    expect_ctrl(6'b100001, "SUB", 1, 0,   0,  1,  1,  0, 0, 0, 0);
    expect_ctrl(6'b100010, "LW",  1, 0,   1,  1,  0,  1, 0, 0, 1);
    expect_ctrl(6'b100011, "SW",  0, 1,   1,  1,  0,  0, 1, 0, 0);
    expect_ctrl(6'b100100, "BEQ", 0, 1,   0,  1,  2,  0, 0, 1, 0);
    expect_ctrl(6'b100101, "LI",  1, 0,   0,  0,  0,  0, 0, 0, 2);
    for (int op = 0; op < 64; op++) begin
      if (op >= 6'b100000 && op <= 6'b100101) continue;
      opcode = 6'(op); #1;
      checks++;
      if (valid || ctrl.mem_write || ctrl.branch) begin
        failures++;
        $display("FAIL: undefined opcode %b not inert", 6'(op));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
