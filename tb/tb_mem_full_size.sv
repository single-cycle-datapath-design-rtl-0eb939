// tb_mem_full_size: the memory test procedure on the memory at its default
// size (2**28 words). For port 1, then port 2, each selected location gets
// the pattern 1010...10 (WE=1), and after 20 time units it is read back
// (OE=1, WE=0) and compared. A sweep of all 2**28 locations is too long to
// simulate, so the selected locations are the first and last 2048 words,
// every single-bit address and its complement, and 20000 random addresses.
// Afterwards every single-bit address receives a distinct value and all are
// read back, which exposes any stuck or shorted address line.
module tb_mem_full_size;
  localparam logic [31:0] PATTERN = 32'b10101010101010101010101010101010;
  localparam int unsigned AWS = 28;   // default depth of dual_port_mem

  logic        clk = 1'b0, cs = 1'b1;
  logic [31:0] addr1 = '0, addr2 = '0, din1 = '0, din2 = '0, dout1, dout2;
  logic        we1 = 1'b0, we2 = 1'b0, oe1 = 1'b0, oe2 = 1'b0;
  int checks = 0, failures = 0;

  dual_port_mem dut (
    .clk(clk), .cs(cs),
    .addr1(addr1), .we1(we1), .oe1(oe1), .data1_in(din1), .data1_out(dout1),
    .addr2(addr2), .we2(we2), .oe2(oe2), .data2_in(din2), .data2_out(dout2));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic wr(input int p, input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    if (p == 1) begin addr1 = a; din1 = d; we1 = 1; oe1 = 0; end
    else        begin addr2 = a; din2 = d; we2 = 1; oe2 = 0; end
    @(posedge clk); #1;
    we1 = 0; we2 = 0;
  endtask

  task automatic rd(input int p, input logic [31:0] a, output logic [31:0] d);
    if (p == 1) begin addr1 = a; oe1 = 1; #1 d = dout1; end
    else        begin addr2 = a; oe2 = 1; #1 d = dout2; end
  endtask

  initial begin
    logic [31:0] r;
    logic [31:0] addrs [$];
    for (int a = 0; a < 2048; a++) addrs.push_back(32'(a));
    for (int a = 0; a < 2048; a++) addrs.push_back(32'((1 << AWS) - 1 - a));
    for (int k = 0; k < AWS; k++) begin
      addrs.push_back(32'(1) << k);
      addrs.push_back(~(32'(1) << k) & ((32'(1) << AWS) - 1));
    end
    for (int i = 0; i < 20000; i++) addrs.push_back($urandom & ((32'(1) << AWS) - 1));

    for (int p = 1; p <= 2; p++) begin
      foreach (addrs[i]) begin
        wr(p, addrs[i], PATTERN);
        #20;
        rd(p, addrs[i], r);
        check(r == PATTERN, $sformatf("port %0d addr %h read %h", p, addrs[i], r));
      end
      // address lines: distinct value at address 0 and each single-bit address
      wr(p, 0, 32'hFFFF_0000 | 32'(p));
      for (int k = 0; k < AWS; k++) wr(p, 32'(1) << k, {8'(k), 8'(p), 16'h5A5A});
      rd(p, 0, r);
      check(r == (32'hFFFF_0000 | 32'(p)), $sformatf("port %0d address 0 overwritten: %h", p, r));
      for (int k = 0; k < AWS; k++) begin
        rd(p, 32'(1) << k, r);
        check(r == {8'(k), 8'(p), 16'h5A5A}, $sformatf("port %0d address line %0d: %h", p, k, r));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
