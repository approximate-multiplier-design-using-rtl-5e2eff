// Exhaustive test of hs_compressor42 against the published truth table,
// and of its error distance: -1 for inputs 0011 and 1111, +1 for 0100 and
// 1000 (written v1 v2 v3 v4), 0 elsewhere, so the errors sum to zero.
module tb_hs_compressor42;
  import mult_ref_pkg::*;
  logic [3:0] v;
  logic ca, su;
  int checks = 0, failures = 0;

  hs_compressor42 dut (.v(v), .ca(ca), .su(su));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ed, ed_sum, want_ed;
    logic [3:0] t;  // t = {v1, v2, v3, v4}
    ed_sum = 0;
    for (int i = 0; i < 16; i++) begin
      t = 4'(i);
      v = {t[0], t[1], t[2], t[3]};
      #1;
      checks++;
      if ({ca, su} != hs_ref(t[3], t[2], t[1], t[0])) begin
        failures++;
        $display("FAIL v1..v4=%b -> ca=%b su=%b", t, ca, su);
      end
      ed = 2 * int'(ca) + int'(su) - $countones(t);
      want_ed = (t == 4'b0011 || t == 4'b1111) ? -1 : (t == 4'b0100 || t == 4'b1000) ? 1 : 0;
      checks++;
      if (ed != want_ed) begin
        failures++;
        $display("FAIL ED v1..v4=%b ed=%0d want %0d", t, ed, want_ed);
      end
      ed_sum += ed;
    end
    checks++;
    if (ed_sum != 0) begin
      failures++;
      $display("FAIL error sum %0d", ed_sum);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
