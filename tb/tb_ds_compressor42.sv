// Test of the dual-stage compressor pair. Exhaustively: the first stage
// (ds_compressor42_n) must give the complement of the published truth
// table; the second stage (ds_compressor42_p) fed with complemented inputs
// must give the table itself. Then four first-stage cells feed one
// second-stage cell with their complemented sums and carries, as in two
// consecutive reduction stages, and the result is compared with the table
// applied twice (1000 random 16-bit input sets).
module tb_ds_compressor42;
  import mult_ref_pkg::*;
  logic [3:0] v, vn;
  logic ca_n, su_n, ca, su;
  logic [15:0] w;
  logic [3:0] ca4_n, su4_n;
  logic ca_o, su_o;
  int checks = 0, failures = 0;

  ds_compressor42_n dut_n (.v(v), .ca_n(ca_n), .su_n(su_n));
  ds_compressor42_p dut_p (.v_n(vn), .ca(ca), .su(su));

  for (genvar g = 0; g < 4; g++) begin : g_first
    ds_compressor42_n u (.v(w[4*g +: 4]), .ca_n(ca4_n[g]), .su_n(su4_n[g]));
  end
  // second stage takes sums of cells 0,1 and carries of cells 2,3
  ds_compressor42_p u_second (.v_n({ca4_n[3], ca4_n[2], su4_n[1], su4_n[0]}), .ca(ca_o), .su(su_o));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] r [4];
    logic [1:0] want;
    w = '0;
    for (int i = 0; i < 16; i++) begin
      v = 4'(i);
      vn = ~4'(i);
      #1;
      want = hs_ref(v[0], v[1], v[2], v[3]);
      checks++;
      if ({ca_n, su_n} != ~want) begin
        failures++;
        $display("FAIL first stage v=%b -> ca_n=%b su_n=%b", v, ca_n, su_n);
      end
      checks++;
      if ({ca, su} != want) begin
        failures++;
        $display("FAIL second stage v=%b -> ca=%b su=%b", v, ca, su);
      end
    end
    for (int i = 0; i < 1000; i++) begin
      w = 16'($urandom);
      #1;
      for (int g = 0; g < 4; g++)
        r[g] = hs_ref(w[4*g], w[4*g+1], w[4*g+2], w[4*g+3]);
      want = hs_ref(r[0][0], r[1][0], r[2][1], r[3][1]);
      checks++;
      if ({ca_o, su_o} != want) begin
        failures++;
        $display("FAIL cascade w=%h -> %b%b want %b", w, ca_o, su_o, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
