// Exhaustive test of half_adder: all 4 input combinations.
module tb_half_adder;
  logic a, b, s, cout;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .s(s), .cout(cout));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (2 * int'(cout) + int'(s) != int'(a) + int'(b)) begin
        failures++;
        $display("FAIL a=%b b=%b -> cout=%b s=%b", a, b, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
