// tb_dual_port_mem: memory test on a 64-word instance.
// For port 1, then port 2: write the pattern 1010...10 to every location
// (WE=1), wait 20 time units, read it back (OE=1, WE=0) and compare; then the
// same with a different value per location to catch address aliasing. Also
// checks that chip select off blocks writes and reads, that OE=0 gives 0, that
// a word written on one port reads back on the other, and that a write lands
// only on the rising edge.
module tb_dual_port_mem;
  localparam int unsigned AWS = 6;
  localparam int unsigned N   = 1 << AWS;
  localparam logic [31:0] PATTERN = 32'b10101010101010101010101010101010;

  logic        clk = 1'b0, cs;
  logic [31:0] addr1, addr2, din1, din2, dout1, dout2;
  logic        we1, we2, oe1, oe2;
  int checks = 0, failures = 0;

  dual_port_mem #(.MEM_AW(AWS)) dut (
    .clk(clk), .cs(cs),
    .addr1(addr1), .we1(we1), .oe1(oe1), .data1_in(din1), .data1_out(dout1),
    .addr2(addr2), .we2(we2), .oe2(oe2), .data2_in(din2), .data2_out(dout2));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // write through port p at the next rising edge
  task automatic wr(input int p, input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    if (p == 1) begin addr1 = a; din1 = d; we1 = 1; oe1 = 0; end
    else        begin addr2 = a; din2 = d; we2 = 1; oe2 = 0; end
    @(posedge clk); #1;
    we1 = 0; we2 = 0;
  endtask

  task automatic rd(input int p, input logic [31:0] a, output logic [31:0] d);
    if (p == 1) begin addr1 = a; oe1 = 1; we1 = 0; #1 d = dout1; end
    else        begin addr2 = a; oe2 = 1; we2 = 0; #1 d = dout2; end
  endtask

  initial begin
    logic [31:0] r;
    cs = 1; we1 = 0; we2 = 0; oe1 = 0; oe2 = 0;
    addr1 = 0; addr2 = 0; din1 = 0; din2 = 0;
    for (int p = 1; p <= 2; p++) begin
      for (int a = 0; a < N; a++) begin
        wr(p, a, PATTERN);
        #20;
        rd(p, a, r);
        check(r == PATTERN, $sformatf("port %0d addr %0d read %h", p, a, r));
      end
      for (int a = 0; a < N; a++) wr(p, a, {16'(a), 8'(p), 8'hA5});
      for (int a = 0; a < N; a++) begin
        rd(p, a, r);
        check(r == {16'(a), 8'(p), 8'hA5}, $sformatf("port %0d addr %0d unique read %h", p, a, r));
      end
    end
    // cross-port visibility
    wr(1, 7, 32'hCAFE_0001);
    rd(2, 7, r); check(r == 32'hCAFE_0001, "port 2 reads port 1 write");
    wr(2, 9, 32'hCAFE_0002);
    rd(1, 9, r); check(r == 32'hCAFE_0002, "port 1 reads port 2 write");
    // output enable off
    oe1 = 0; oe2 = 0; #1;
    check(dout1 == 0 && dout2 == 0, "OE=0 drives 0");
    // chip select off: no read, no write
    cs = 0;
    wr(1, 7, 32'h1111_1111);
    rd(1, 7, r); check(r == 0, "CS=0 read gives 0");
    cs = 1;
    rd(1, 7, r); check(r == 32'hCAFE_0001, "CS=0 blocked the write");
    // write happens on the rising edge, not before
    @(negedge clk);
    addr1 = 12; din1 = 32'h5555_AAAA; we1 = 1;
    addr2 = 12; oe2 = 1;
    #1 check(dout2 != 32'h5555_AAAA, "no write before the rising edge");
    @(posedge clk); #1 we1 = 0;
    check(dout2 == 32'h5555_AAAA, "write after the rising edge");
    // both ports write one word on the same edge: port 2 wins
    @(negedge clk);
    addr1 = 20; din1 = 32'h1; we1 = 1; addr2 = 20; din2 = 32'h2; we2 = 1;
    @(posedge clk); #1 we1 = 0; we2 = 0;
    rd(1, 20, r); check(r == 32'h2, "simultaneous write keeps port 2");
    // upper address bits are ignored (address space wraps)
    rd(1, 32'h0001_0000 + 20, r); check(r == 32'h2, "address wraps to stored depth");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
