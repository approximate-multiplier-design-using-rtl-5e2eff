// 8x8 unsigned approximate Dadda multiplier built on the new approximate
// 4:2 compressor (novel_compressor42), or, with COMP = M8_DUAL_STAGE, on the
// modified dual-stage compressor pair.
//
// Structure. The 64 partial products pp[i][j] = b[i] & a[j] sit in columns
// 0..14 of heights 1..8..1. Two reduction stages bring every column down to
// 4 and then 2 bits; the two remaining rows go to a 16-bit ripple-carry
// adder (rca), whose carry is p[16]. The stage count and the use of 4:2
// compressors, full adders and half adders follow the published dot
// diagram. With the default COMP = M8_NEW_COMP every 4:2 compressor of this
// tree is the new approximate one, which is wrong only when its four inputs
// are all 1 (it then gives 2 instead of 4); the product is therefore never
// larger than the exact one. The published text introduces the 8x8 tree as
// the test vehicle of that compressor, while its comparison table names the
// proposed 8-bit multiplier as one using dual-stage compressors; COMP =
// M8_DUAL_STAGE builds that reading: the same positions hold
// ds_compressor42_n in stage 1 and ds_compressor42_p in stage 2. The
// stage-1 outputs are then complemented and go straight into the stage-2
// cells; the true bits that join them there (partial products and adder
// outputs) are complemented at the cell input.
//
// Schedule (this design's own, Dadda style, shared with the 16-bit tree):
// in each stage columns are handled from the least significant up. A
// column's bits are the carries-out of the compressors one column lower in
// the same stage (none here), then its pool in order. While the column would
// still hold more than the stage's target after counting the carries that
// arrive from below, it takes the first bits of its list into a 4:2
// compressor (removes 3), a full adder (removes 2) or a half adder
// (removes 1), using the largest that the excess allows. Its pool for the
// next stage is: carries from the column below, then its own new sums, then
// its untouched bits. Inputs are given in list order as a[0], a[1], ...
//
// Interface and timing: purely combinational, no clock or reset; p is valid
// one combinational delay after a and b.
//
// The instance list below follows mechanically from that schedule, cell by
// cell and stage by stage; net names give the stage and column (s2_c13_sum0
// is the first sum made in column 13 by stage 2).

// Cell count of this tree: 4:2 compressor chosen by COMP x17, full_adder x1, half_adder x6.

module dadda_mult8 
  import amul_pkg::*;
#(
  parameter mult8_comp_e COMP = M8_NEW_COMP  // compressor in every 4:2 position
) (
  input  logic [7:0]  a,  // multiplicand
  input  logic [7:0]  b,  // multiplier
  output logic [16:0] p   // approximate product; p[16] is the final adder's carry
);

  // Partial products: pp[i][j] = b[i] & a[j], weight 2**(i+j).
  logic [7:0][7:0] pp;
  always_comb for (int i = 0; i < 8; i++) pp[i] = a & {8{b[i]}};

  logic s1_c4_sum0;
  logic s1_c4_car0;
  logic s1_c5_sum0;
  logic s1_c5_car0;
  logic s1_c6_sum0;
  logic s1_c6_car0;
  logic s1_c6_sum1;
  logic s1_c6_car1;
  logic s1_c7_sum0;
  logic s1_c7_car0;
  logic s1_c7_sum1;
  logic s1_c7_car1;
  logic s1_c8_sum0;
  logic s1_c8_car0;
  logic s1_c8_sum1;
  logic s1_c8_car1;
  logic s1_c9_sum0;
  logic s1_c9_car0;
  logic s1_c9_sum1;
  logic s1_c9_car1;
  logic s1_c10_sum0;
  logic s1_c10_car0;
  logic s1_c11_sum0;
  logic s1_c11_car0;
  logic s2_c2_sum0;
  logic s2_c2_car0;
  logic s2_c3_sum0;
  logic s2_c3_car0;
  logic s2_c4_sum0;
  logic s2_c4_car0;
  logic s2_c5_sum0;
  logic s2_c5_car0;
  logic s2_c6_sum0;
  logic s2_c6_car0;
  logic s2_c7_sum0;
  logic s2_c7_car0;
  logic s2_c8_sum0;
  logic s2_c8_car0;
  logic s2_c9_sum0;
  logic s2_c9_car0;
  logic s2_c10_sum0;
  logic s2_c10_car0;
  logic s2_c11_sum0;
  logic s2_c11_car0;
  logic s2_c12_sum0;
  logic s2_c12_car0;
  logic s2_c13_sum0;
  logic s2_c13_car0;

  // ---- reduction stage 1: every column down to 4 bits ----
  half_adder u_s1_c4_sum0 (.a(pp[0][4]), .b(pp[1][3]), .s(s1_c4_sum0), .cout(s1_c4_car0));
  if (COMP == M8_NEW_COMP) begin : g_s1_c5_sum0
    novel_compressor42 u_cell (.a({pp[3][2], pp[2][3], pp[1][4], pp[0][5]}), .cout(s1_c5_car0), .s1(s1_c5_sum0));
  end else begin : g_s1_c5_sum0_ds
    ds_compressor42_n u_cell (.v({pp[3][2], pp[2][3], pp[1][4], pp[0][5]}), .ca_n(s1_c5_car0), .su_n(s1_c5_sum0));
  end
  if (COMP == M8_NEW_COMP) begin : g_s1_c6_sum0
    novel_compressor42 u_cell (.a({pp[3][3], pp[2][4], pp[1][5], pp[0][6]}), .cout(s1_c6_car0), .s1(s1_c6_sum0));
  end else begin : g_s1_c6_sum0_ds
    ds_compressor42_n u_cell (.v({pp[3][3], pp[2][4], pp[1][5], pp[0][6]}), .ca_n(s1_c6_car0), .su_n(s1_c6_sum0));
  end
  half_adder u_s1_c6_sum1 (.a(pp[4][2]), .b(pp[5][1]), .s(s1_c6_sum1), .cout(s1_c6_car1));
  if (COMP == M8_NEW_COMP) begin : g_s1_c7_sum0
    novel_compressor42 u_cell (.a({pp[3][4], pp[2][5], pp[1][6], pp[0][7]}), .cout(s1_c7_car0), .s1(s1_c7_sum0));
  end else begin : g_s1_c7_sum0_ds
    ds_compressor42_n u_cell (.v({pp[3][4], pp[2][5], pp[1][6], pp[0][7]}), .ca_n(s1_c7_car0), .su_n(s1_c7_sum0));
  end
  if (COMP == M8_NEW_COMP) begin : g_s1_c7_sum1
    novel_compressor42 u_cell (.a({pp[7][0], pp[6][1], pp[5][2], pp[4][3]}), .cout(s1_c7_car1), .s1(s1_c7_sum1));
  end else begin : g_s1_c7_sum1_ds
    ds_compressor42_n u_cell (.v({pp[7][0], pp[6][1], pp[5][2], pp[4][3]}), .ca_n(s1_c7_car1), .su_n(s1_c7_sum1));
  end
  if (COMP == M8_NEW_COMP) begin : g_s1_c8_sum0
    novel_compressor42 u_cell (.a({pp[4][4], pp[3][5], pp[2][6], pp[1][7]}), .cout(s1_c8_car0), .s1(s1_c8_sum0));
  end else begin : g_s1_c8_sum0_ds
    ds_compressor42_n u_cell (.v({pp[4][4], pp[3][5], pp[2][6], pp[1][7]}), .ca_n(s1_c8_car0), .su_n(s1_c8_sum0));
  end
  full_adder u_s1_c8_sum1 (.a(pp[5][3]), .b(pp[6][2]), .c(pp[7][1]), .s(s1_c8_sum1), .cout(s1_c8_car1));
  if (COMP == M8_NEW_COMP) begin : g_s1_c9_sum0
    novel_compressor42 u_cell (.a({pp[5][4], pp[4][5], pp[3][6], pp[2][7]}), .cout(s1_c9_car0), .s1(s1_c9_sum0));
  end else begin : g_s1_c9_sum0_ds
    ds_compressor42_n u_cell (.v({pp[5][4], pp[4][5], pp[3][6], pp[2][7]}), .ca_n(s1_c9_car0), .su_n(s1_c9_sum0));
  end
  half_adder u_s1_c9_sum1 (.a(pp[6][3]), .b(pp[7][2]), .s(s1_c9_sum1), .cout(s1_c9_car1));
  if (COMP == M8_NEW_COMP) begin : g_s1_c10_sum0
    novel_compressor42 u_cell (.a({pp[6][4], pp[5][5], pp[4][6], pp[3][7]}), .cout(s1_c10_car0), .s1(s1_c10_sum0));
  end else begin : g_s1_c10_sum0_ds
    ds_compressor42_n u_cell (.v({pp[6][4], pp[5][5], pp[4][6], pp[3][7]}), .ca_n(s1_c10_car0), .su_n(s1_c10_sum0));
  end
  half_adder u_s1_c11_sum0 (.a(pp[4][7]), .b(pp[5][6]), .s(s1_c11_sum0), .cout(s1_c11_car0));

  // ---- reduction stage 2: every column down to 2 bits ----
  half_adder u_s2_c2_sum0 (.a(pp[0][2]), .b(pp[1][1]), .s(s2_c2_sum0), .cout(s2_c2_car0));
  if (COMP == M8_NEW_COMP) begin : g_s2_c3_sum0
    novel_compressor42 u_cell (.a({pp[3][0], pp[2][1], pp[1][2], pp[0][3]}), .cout(s2_c3_car0), .s1(s2_c3_sum0));
  end else begin : g_s2_c3_sum0_ds
    ds_compressor42_p u_cell (.v_n({~pp[3][0], ~pp[2][1], ~pp[1][2], ~pp[0][3]}), .ca(s2_c3_car0), .su(s2_c3_sum0));
  end
  if (COMP == M8_NEW_COMP) begin : g_s2_c4_sum0
    novel_compressor42 u_cell (.a({pp[4][0], pp[3][1], pp[2][2], s1_c4_sum0}), .cout(s2_c4_car0), .s1(s2_c4_sum0));
  end else begin : g_s2_c4_sum0_ds
    ds_compressor42_p u_cell (.v_n({~pp[4][0], ~pp[3][1], ~pp[2][2], ~s1_c4_sum0}), .ca(s2_c4_car0), .su(s2_c4_sum0));
  end
  if (COMP == M8_NEW_COMP) begin : g_s2_c5_sum0
    novel_compressor42 u_cell (.a({pp[5][0], pp[4][1], s1_c5_sum0, s1_c4_car0}), .cout(s2_c5_car0), .s1(s2_c5_sum0));
  end else begin : g_s2_c5_sum0_ds
    ds_compressor42_p u_cell (.v_n({~pp[5][0], ~pp[4][1], s1_c5_sum0, ~s1_c4_car0}), .ca(s2_c5_car0), .su(s2_c5_sum0));
  end
  if (COMP == M8_NEW_COMP) begin : g_s2_c6_sum0
    novel_compressor42 u_cell (.a({pp[6][0], s1_c6_sum1, s1_c6_sum0, s1_c5_car0}), .cout(s2_c6_car0), .s1(s2_c6_sum0));
  end else begin : g_s2_c6_sum0_ds
    ds_compressor42_p u_cell (.v_n({~pp[6][0], ~s1_c6_sum1, s1_c6_sum0, s1_c5_car0}), .ca(s2_c6_car0), .su(s2_c6_sum0));
  end
  if (COMP == M8_NEW_COMP) begin : g_s2_c7_sum0
    novel_compressor42 u_cell (.a({s1_c7_sum1, s1_c7_sum0, s1_c6_car1, s1_c6_car0}), .cout(s2_c7_car0), .s1(s2_c7_sum0));
  end else begin : g_s2_c7_sum0_ds
    ds_compressor42_p u_cell (.v_n({s1_c7_sum1, s1_c7_sum0, ~s1_c6_car1, s1_c6_car0}), .ca(s2_c7_car0), .su(s2_c7_sum0));
  end
  if (COMP == M8_NEW_COMP) begin : g_s2_c8_sum0
    novel_compressor42 u_cell (.a({s1_c8_sum1, s1_c8_sum0, s1_c7_car1, s1_c7_car0}), .cout(s2_c8_car0), .s1(s2_c8_sum0));
  end else begin : g_s2_c8_sum0_ds
    ds_compressor42_p u_cell (.v_n({~s1_c8_sum1, s1_c8_sum0, s1_c7_car1, s1_c7_car0}), .ca(s2_c8_car0), .su(s2_c8_sum0));
  end
  if (COMP == M8_NEW_COMP) begin : g_s2_c9_sum0
    novel_compressor42 u_cell (.a({s1_c9_sum1, s1_c9_sum0, s1_c8_car1, s1_c8_car0}), .cout(s2_c9_car0), .s1(s2_c9_sum0));
  end else begin : g_s2_c9_sum0_ds
    ds_compressor42_p u_cell (.v_n({~s1_c9_sum1, s1_c9_sum0, ~s1_c8_car1, s1_c8_car0}), .ca(s2_c9_car0), .su(s2_c9_sum0));
  end
  if (COMP == M8_NEW_COMP) begin : g_s2_c10_sum0
    novel_compressor42 u_cell (.a({pp[7][3], s1_c10_sum0, s1_c9_car1, s1_c9_car0}), .cout(s2_c10_car0), .s1(s2_c10_sum0));
  end else begin : g_s2_c10_sum0_ds
    ds_compressor42_p u_cell (.v_n({~pp[7][3], s1_c10_sum0, ~s1_c9_car1, s1_c9_car0}), .ca(s2_c10_car0), .su(s2_c10_sum0));
  end
  if (COMP == M8_NEW_COMP) begin : g_s2_c11_sum0
    novel_compressor42 u_cell (.a({pp[7][4], pp[6][5], s1_c11_sum0, s1_c10_car0}), .cout(s2_c11_car0), .s1(s2_c11_sum0));
  end else begin : g_s2_c11_sum0_ds
    ds_compressor42_p u_cell (.v_n({~pp[7][4], ~pp[6][5], ~s1_c11_sum0, s1_c10_car0}), .ca(s2_c11_car0), .su(s2_c11_sum0));
  end
  if (COMP == M8_NEW_COMP) begin : g_s2_c12_sum0
    novel_compressor42 u_cell (.a({pp[7][5], pp[6][6], pp[5][7], s1_c11_car0}), .cout(s2_c12_car0), .s1(s2_c12_sum0));
  end else begin : g_s2_c12_sum0_ds
    ds_compressor42_p u_cell (.v_n({~pp[7][5], ~pp[6][6], ~pp[5][7], ~s1_c11_car0}), .ca(s2_c12_car0), .su(s2_c12_sum0));
  end
  half_adder u_s2_c13_sum0 (.a(pp[6][7]), .b(pp[7][6]), .s(s2_c13_sum0), .cout(s2_c13_car0));

  // ---- final ripple-carry adder of the two remaining rows ----
  logic [15:0] row_x, row_y;
  assign row_x = {1'b0, s2_c13_car0, s2_c12_car0, s2_c11_car0, s2_c10_car0, s2_c9_car0, s2_c8_car0, s2_c7_car0, s2_c6_car0, s2_c5_car0, s2_c4_car0, s2_c3_car0, s2_c2_car0, s2_c2_sum0, pp[0][1], pp[0][0]};
  assign row_y = {1'b0, pp[7][7], s2_c13_sum0, s2_c12_sum0, s2_c11_sum0, s2_c10_sum0, s2_c9_sum0, s2_c8_sum0, s2_c7_sum0, s2_c6_sum0, s2_c5_sum0, s2_c4_sum0, s2_c3_sum0, pp[2][0], pp[1][0], 1'b0};
  rca #(.W(16)) u_final (.x(row_x), .y(row_y), .s(p));
endmodule
