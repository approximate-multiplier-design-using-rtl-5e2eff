// Exhaustive test of the 8x8 approximate multiplier in both compressor
// settings. dut (default, new compressor) and dut_ds (dual-stage pair)
// see all 65536 operand pairs; both are compared with mult_ref_pkg::ref_mult,
// a behavioural model of the same reduction schedule and compressor truth
// tables (it treats a dual-stage pair as the high-speed compressor, so it
// also checks the polarity handling). For the default it also checks what
// follows from the new compressor alone: a product with a zero or
// power-of-two operand is exact, no product exceeds the exact one, and some
// products are below it. It prints the error rate and mean error of each.
module tb_dadda_mult8;
  import mult_ref_pkg::*;
  import amul_pkg::*;
  logic [7:0] a, b;
  logic [16:0] p, p_ds;
  int checks = 0, failures = 0;

  dadda_mult8 dut (.a(a), .b(b), .p(p));
  dadda_mult8 #(.COMP(M8_DUAL_STAGE)) dut_ds (.a(a), .b(b), .p(p_ds));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned exact, want, want_ds;
    longint n_err, sum_ed, n_err_ds, sum_ed_ds;
    n_err = 0; sum_ed = 0; n_err_ds = 0; sum_ed_ds = 0;
    for (int i = 0; i < 65536; i++) begin
      {a, b} = 16'(i);
      #1;
      exact = longint'(a) * longint'(b);
      want = ref_mult(1'b0, longint'(a), longint'(b));
      want_ds = ref_mult(1'b0, longint'(a), longint'(b), 1'b1);
      checks++;
      if (longint'(p) != want) begin
        failures++;
        if (failures < 10) $display("FAIL %0d*%0d -> %0d, model %0d", a, b, p, want);
      end
      checks++;
      if (longint'(p_ds) != want_ds) begin
        failures++;
        if (failures < 10) $display("FAIL dual-stage %0d*%0d -> %0d, model %0d", a, b, p_ds, want_ds);
      end
      checks++;
      if (longint'(p) > exact) begin
        failures++;
        if (failures < 10) $display("FAIL %0d*%0d -> %0d above exact %0d", a, b, p, exact);
      end
      if ($countones(a) <= 1 || $countones(b) <= 1) begin
        checks++;
        if (longint'(p) != exact) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d -> %0d, single-row product must be exact", a, b, p);
        end
      end
      if (longint'(p) != exact) begin
        n_err++;
        sum_ed += longint'(p) - longint'(exact);
      end
      if (longint'(p_ds) != exact) begin
        n_err_ds++;
        sum_ed_ds += longint'(p_ds) - longint'(exact);
      end
    end
    checks++;
    if (n_err == 0 || n_err_ds == 0) begin
      failures++;
      $display("FAIL no approximate product seen");
    end
    $display("new compressor: error rate %0d/65536, mean error %0d/65536", n_err, sum_ed);
    $display("dual-stage:     error rate %0d/65536, mean error %0d/65536", n_err_ds, sum_ed_ds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
