// End-to-end test of the top level at its only size (8x8 and 16x16 side by
// side). Both multipliers get independent operands on every vector: 65536
// exhaustive 8x8 pairs, each with a random 16x16 pair, plus corner operands.
// Both products are compared with the behavioural model in mult_ref_pkg.
// It counts how often each mechanism of the design occurred and fails if
// any never did:
//   - the new compressor's only error (all four inputs 1) in the 8x8 tree;
//   - 8x8 products below the exact product, and exact ones;
//   - 16x16 products above, below and equal to the exact product (the
//     high-speed compressor errs both ways);
//   - a first-stage dual-stage cell emitting a complemented 1 (output 0)
//     that a second-stage cell turns back into a true 1;
//   - a COUT passed along the exact compressor chain into a CIN.
module tb_approx_mult_top;
  import mult_ref_pkg::*;
  logic [7:0]  a8, b8;
  logic [16:0] p8;
  logic [15:0] in, v;
  logic [32:0] z;
  int checks = 0, failures = 0;

  approx_mult_top dut (.a8(a8), .b8(b8), .p8(p8), .in(in), .v(v), .z(z));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_novel_err, n_m8_under, n_m8_exact, n_m16_over, n_m16_under, n_m16_exact;
  int n_ds_inv, n_ds_restore, n_cout_chain;

  task automatic apply(input logic [7:0] x8, input logic [7:0] y8,
                       input logic [15:0] x16, input logic [15:0] y16);
    longint unsigned w8, w16, e8, e16;
    a8 = x8; b8 = y8; in = x16; v = y16;
    #1;
    w8  = ref_mult(1'b0, longint'(x8), longint'(y8));
    w16 = ref_mult(1'b1, longint'(x16), longint'(y16));
    e8  = longint'(x8) * longint'(y8);
    e16 = longint'(x16) * longint'(y16);
    checks++;
    if (longint'(p8) != w8) begin
      failures++;
      if (failures < 10) $display("FAIL 8x8 %0d*%0d -> %0d, model %0d", x8, y8, p8, w8);
    end
    checks++;
    if (longint'(z) != w16) begin
      failures++;
      if (failures < 10) $display("FAIL 16x16 %0d*%0d -> %0d, model %0d", x16, y16, z, w16);
    end
    if (dut.u_m8.g_s1_c7_sum0.u_cell.a == 4'hf) n_novel_err++;
    if (longint'(p8) < e8) n_m8_under++;
    if (longint'(p8) == e8) n_m8_exact++;
    if (longint'(z) > e16) n_m16_over++;
    if (longint'(z) < e16) n_m16_under++;
    if (longint'(z) == e16) n_m16_exact++;
    if (!dut.u_m16.u_s1_c15_sum0.su_n) n_ds_inv++;
    if (dut.u_m16.u_s2_c15_sum0.su) n_ds_restore++;
    if (dut.u_m16.u_s1_c19_sum0.cin) n_cout_chain++;
  endtask

  task automatic need(input string what, input int n);
    checks++;
    $display("%-40s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never occurred: %s", what);
    end
  endtask

  initial begin
    n_novel_err = 0; n_m8_under = 0; n_m8_exact = 0;
    n_m16_over = 0; n_m16_under = 0; n_m16_exact = 0;
    n_ds_inv = 0; n_ds_restore = 0; n_cout_chain = 0;
    apply('0, '0, '0, '0);
    apply('1, '1, '1, '1);
    apply('1, 1, '1, 1);
    for (int i = 0; i < 65536; i++)
      apply(8'(i >> 8), 8'(i), 16'($urandom), 16'($urandom));
    for (int i = 0; i < 16; i++) apply(8'(i), 8'(i), 16'(1) << i, 16'hffff);
    need("8x8: new compressor input 1111", n_novel_err);
    need("8x8: product below exact", n_m8_under);
    need("8x8: product exact", n_m8_exact);
    need("16x16: product above exact", n_m16_over);
    need("16x16: product below exact", n_m16_under);
    need("16x16: product exact", n_m16_exact);
    need("16x16: dual-stage complemented output", n_ds_inv);
    need("16x16: dual-stage restored output", n_ds_restore);
    need("16x16: exact COUT into CIN", n_cout_chain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
