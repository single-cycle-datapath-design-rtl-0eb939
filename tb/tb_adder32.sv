// tb_adder32: checks the adder on corner cases and random operands against
// the sum computed in 64-bit arithmetic and truncated to 32 bits.
module tb_adder32;
  logic [31:0] a, b, sum;
  int checks = 0, failures = 0;

  adder32 #(.WIDTH(32)) dut (.a(a), .b(b), .sum(sum));

  task automatic apply(input logic [31:0] x, input logic [31:0] y);
    longint unsigned ref64;
    a = x; b = y; #1;
    ref64 = longint'(x) + longint'(y);
    checks++;
    if (sum !== ref64[31:0]) begin
      failures++;
      $display("FAIL: %h + %h = %h, expected %h", x, y, sum, ref64[31:0]);
    end
  endtask

  initial begin
    apply(0, 0); apply(1, 1); apply(32'hFFFF_FFFF, 1); apply(32'h7FFF_FFFF, 1);
    apply(32'h8000_0000, 32'h8000_0000); apply(32'h0000_FFFF, 32'h0000_0001);
    for (int i = 0; i < 500; i++) apply($urandom, $urandom);
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
