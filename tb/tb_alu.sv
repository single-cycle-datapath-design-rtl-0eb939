// tb_alu: drives two operands with ALU Instr 0, 1, 2 and 3 and chip select on
// and off, and compares the result and Z output with the sum, difference and
// equality worked out in the testbench.
module tb_alu;
  import sc_pkg::*;
  logic       cs, z;
  alu_instr_e op;
  word_t      in1, in2, result;
  int checks = 0, failures = 0;

  alu dut (.cs(cs), .alu_instr(op), .in1(in1), .in2(in2), .result(result), .z(z));

  task automatic apply(input logic c, input alu_instr_e o, input word_t a, input word_t b);
    word_t exp_r;
    logic  exp_z;
    cs = c; op = o; in1 = a; in2 = b; #1;
    exp_r = '0; exp_z = 1'b0;
    if (c) begin
      if (o == ALU_ADD) exp_r = word_t'(longint'(a) + longint'(b));
      if (o == ALU_SUB) exp_r = word_t'(longint'(a) - longint'(b));
      if (o == ALU_CMP) exp_z = (a == b);
    end
    checks++;
    if (result !== exp_r || z !== exp_z) begin
      failures++;
      $display("FAIL: cs=%b op=%0d a=%h b=%h -> %h z=%b, expected %h z=%b",
               c, o, a, b, result, z, exp_r, exp_z);
    end
  endtask

  initial begin
    alu_instr_e ops [4] = '{ALU_ADD, ALU_SUB, ALU_CMP, ALU_NONE};
    for (int k = 0; k < 4; k++) begin
      apply(1, ops[k], 32'd7, 32'd5);
      apply(1, ops[k], 32'd5, 32'd7);
      apply(1, ops[k], 32'hDEAD_BEEF, 32'hDEAD_BEEF);
      apply(1, ops[k], 32'hFFFF_FFFF, 32'd1);
      apply(0, ops[k], 32'd9, 32'd9);
    end
    for (int i = 0; i < 400; i++) begin
      word_t a, b;
      a = $urandom; b = (i % 5 == 0) ? a : $urandom;
      apply(1'($urandom % 8 != 0), ops[i % 4], a, b);
    end
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
