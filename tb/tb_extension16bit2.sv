// Test of the 16x16 approximate multiplier: corner operands and 100000
// random pairs compared with mult_ref_pkg::ref_mult, a behavioural model of
// the reduction schedule (it treats a dual-stage pair as the high-speed
// compressor, so it also checks the inverters of the dual-stage region).
// A zero operand must give zero, and no error may reach 2**24, since every
// approximate cell sits in columns 0..17. (A power-of-two operand is not
// exact here: the high-speed compressor doubles a lone 1 on its first or
// second input.) It prints the error rate, the mean signed and absolute
// error distance and the error range.
module tb_extension16bit2;
  import mult_ref_pkg::*;
  logic [15:0] in, v;
  logic [32:0] z;
  int checks = 0, failures = 0;
  longint n_err, sum_ed, sum_abs, max_ed, min_ed;

  extension16bit2 dut (.in(in), .v(v), .z(z));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] x, input logic [15:0] y);
    longint unsigned exact, want;
    longint ed;
    in = x; v = y;
    #1;
    exact = longint'(x) * longint'(y);
    want = ref_mult(1'b1, longint'(x), longint'(y));
    checks++;
    if (longint'(z) != want) begin
      failures++;
      if (failures < 10) $display("FAIL %0d*%0d -> %0d, model %0d", x, y, z, want);
    end
    ed = longint'(z) - longint'(exact);
    // all approximate cells sit in columns 0..17, so the error stays far
    // below 2**24; a zero operand gives all-zero compressor inputs
    checks++;
    if (ed >= (64'sd1 <<< 24) || ed <= -(64'sd1 <<< 24) || ((x == 0 || y == 0) && z != 0)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d*%0d -> %0d, error %0d out of bound", x, y, z, ed);
    end
    if (ed > max_ed) max_ed = ed;
    if (ed < min_ed) min_ed = ed;
    if (ed != 0) n_err++;
    sum_ed += ed;
    sum_abs += (ed < 0) ? -ed : ed;
  endtask

  initial begin
    n_err = 0; sum_ed = 0; sum_abs = 0; max_ed = 0; min_ed = 0;
    check('0, '0);
    check('1, '0);
    check('1, '1);
    check('1, 1);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) check(16'(1) << i, 16'(1) << j);
    for (int i = 0; i < 100000; i++) check(16'($urandom), 16'($urandom));
    checks++;
    if (n_err == 0) begin
      failures++;
      $display("FAIL no approximate product seen");
    end
    $display("error rate %0d/100260, mean error %0d, mean |error| %0d, range %0d..%0d",
             n_err, sum_ed / 100260, sum_abs / 100260, min_ed, max_ed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
