// Exhaustive test of full_adder: all 8 input combinations against the
// arithmetic sum of the three bits.
module tb_full_adder;
  logic a, b, c, s, cout;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .c(c), .s(s), .cout(cout));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if (2 * int'(cout) + int'(s) != int'(a) + int'(b) + int'(c)) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b -> cout=%b s=%b", a, b, c, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
