// Exhaustive test of novel_compressor42: exact bit count for every input
// except 1111, where the output must be cout=1, s1=0 (value 2).
module tb_novel_compressor42;
  logic [3:0] a;
  logic cout, s1;
  int checks = 0, failures = 0;

  novel_compressor42 dut (.a(a), .cout(cout), .s1(s1));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want;
    for (int i = 0; i < 16; i++) begin
      a = 4'(i);
      #1;
      want = (a == 4'hf) ? 2 : $countones(a);
      checks++;
      if (2 * int'(cout) + int'(s1) != want) begin
        failures++;
        $display("FAIL a=%b -> cout=%b s1=%b, want value %0d", a, cout, s1, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
