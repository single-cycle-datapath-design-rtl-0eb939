// tb_mux2: checks that the 2-to-1 multiplexer passes d0 when sel is 0 and d1
// when sel is 1, for random data.
module tb_mux2;
  logic        sel;
  logic [31:0] d0, d1, y;
  int checks = 0, failures = 0;

  mux2 #(.WIDTH(32)) dut (.sel(sel), .d0(d0), .d1(d1), .y(y));

  initial begin
    for (int i = 0; i < 200; i++) begin
      sel = 1'(i % 2); d0 = $urandom; d1 = $urandom;
      if (d0 == d1) d1 = ~d0;
      #1;
      checks++;
      if (y !== (sel ? d1 : d0)) begin
        failures++;
        $display("FAIL: sel=%b d0=%h d1=%h y=%h", sel, d0, d1, y);
      end
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
