// Test of the ripple-carry adder at its default width (32 bits): corner
// operands and 20000 random pairs against the built-in addition.
module tb_rca;
  localparam int W = 32;
  logic [W-1:0] x, y;
  logic [W:0] s;
  int checks = 0, failures = 0;

  rca dut (.x(x), .y(y), .s(s));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] xa, input logic [W-1:0] ya);
    x = xa; y = ya;
    #1;
    checks++;
    if (s != {1'b0, xa} + {1'b0, ya}) begin
      failures++;
      $display("FAIL %h + %h -> %h", xa, ya, s);
    end
  endtask

  initial begin
    check('0, '0);
    check('1, '0);
    check('1, 1);
    check('1, '1);
    check({1'b1, {(W-1){1'b0}}}, {1'b1, {(W-1){1'b0}}});
    for (int i = 0; i < 20000; i++) check(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
