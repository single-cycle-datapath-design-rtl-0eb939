// tb_reg_file: checks the register file against a software copy of the 32
// registers: reset clears all, writes land on the falling edge (not on the
// rising edge), we=0 writes nothing, and both read ports return any register.
module tb_reg_file;
  import sc_pkg::*;
  logic   clk = 1'b0, rst, we;
  raddr_t ra, rb, wa;
  word_t  qa, qb, wd;
  word_t  model [32];
  int checks = 0, failures = 0;

  reg_file dut (.clk(clk), .rst(rst), .raddr_a(ra), .rdata_a(qa), .raddr_b(rb), .rdata_b(qb),
                .we(we), .waddr(wa), .wdata(wd));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst = 1; we = 0; ra = 0; rb = 0; wa = 0; wd = 0;
    @(negedge clk); #1 rst = 0;
    for (int i = 0; i < 32; i++) model[i] = '0;
    for (int i = 0; i < 32; i++) begin
      ra = raddr_t'(i); rb = raddr_t'(31 - i); #1;
      check(qa == 0 && qb == 0, $sformatf("reset value of r%0d", i));
    end
    for (int n = 0; n < 300; n++) begin
      we = 1'($urandom % 4 != 0); wa = raddr_t'($urandom); wd = $urandom;
      ra = wa; rb = raddr_t'($urandom);
      @(posedge clk); #1;
      check(qa == model[wa], $sformatf("r%0d changed before the falling edge", wa));
      @(negedge clk); #1;
      if (we) model[wa] = wd;
      check(qa == model[wa], $sformatf("port A r%0d = %h, expected %h", wa, qa, model[wa]));
      check(qb == model[rb], $sformatf("port B r%0d = %h, expected %h", rb, qb, model[rb]));
    end
    we = 0;
    for (int i = 0; i < 32; i++) begin
      ra = raddr_t'(i); rb = raddr_t'(i); #1;
      check(qa == model[i] && qb == model[i], $sformatf("final r%0d", i));
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
