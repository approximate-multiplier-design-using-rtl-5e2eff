// Exhaustive test of exact_compressor42 (32 input combinations): the
// weighted outputs must equal the input count, and COUT must be the carry of
// A1+A2+A3 alone (so that it never depends on CIN). A second part chains two
// compressors as in a compressor row (COUT of column x to CIN of column x+1)
// and checks the three-column total for 512 random input sets.
module tb_exact_compressor42;
  logic [3:0] a, a2;
  logic cin, cout, carry, sum, cout2, carry2, sum2;
  int checks = 0, failures = 0;

  exact_compressor42 dut  (.a(a),  .cin(cin),  .cout(cout),  .carry(carry),  .sum(sum));
  exact_compressor42 dut2 (.a(a2), .cin(cout), .cout(cout2), .carry(carry2), .sum(sum2));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, lo, hi;
    a2 = '0;
    for (int i = 0; i < 32; i++) begin
      {cin, a} = 5'(i);
      #1;
      n = $countones(a) + int'(cin);
      checks++;
      if (int'(sum) + 2 * (int'(carry) + int'(cout)) != n) begin
        failures++;
        $display("FAIL count a=%b cin=%b -> cout=%b carry=%b sum=%b", a, cin, cout, carry, sum);
      end
      checks++;
      if (cout != ($countones(a[2:0]) >= 2)) begin
        failures++;
        $display("FAIL cout a=%b cin=%b -> cout=%b", a, cin, cout);
      end
    end
    for (int i = 0; i < 512; i++) begin
      a = 4'($urandom); a2 = 4'($urandom); cin = 1'($urandom);
      #1;
      lo = $countones(a) + int'(cin);
      hi = $countones(a2);
      checks++;
      // column x weight 1, column x+1 weight 2, column x+2 weight 4
      if (int'(sum) + 2 * (int'(carry) + int'(sum2)) + 4 * (int'(carry2) + int'(cout2))
          != lo + 2 * hi) begin
        failures++;
        $display("FAIL chain a=%b cin=%b a2=%b", a, cin, a2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
