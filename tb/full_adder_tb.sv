// full_adder_tb: exhaustive check of the one-bit adder cell against integer
// addition of its three inputs.
module full_adder_tb;
  logic a, b, c, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .c(c), .s(s), .co(co));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({co, s} != 2'(int'(a) + int'(b) + int'(c))) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b -> co=%0b s=%0b", a, b, c, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
