// 16x16 unsigned approximate Dadda multiplier with three kinds of 4:2
// compressor, placed by column (port names in, v, z as published).
//
// Structure. The 256 partial products pp[i][j] = v[i] & in[j] sit in
// columns 0..30. Three reduction stages bring every column to 8, 4 and 2
// bits; the two remaining rows go to a 32-bit ripple-carry adder (rca),
// whose carry is z[32]. Columns are split into three regions, following
// the published dot diagram:
//   columns 18..31  exact 4:2 compressors (exact_compressor42); the COUT of
//                   a compressor goes, as an input bit, to the column above
//                   in the same stage, and is preferred there as a CIN;
//   columns 13..17  modified dual-stage compressors: in stage 1 the
//                   inverting ds_compressor42_n, in stage 2 the
//                   complement-input ds_compressor42_p, so that the pair
//                   restores true polarity; stage 3 uses hs_compressor42;
//   columns  0..12  high-speed area-efficient compressors (hs_compressor42).
// The column boundaries are read off the diagram (about 5 dual-stage
// columns around the tallest column). Where a bit reaches a cell in the
// wrong polarity, an inverter (a *_i net) is inserted.
// Approximate cells sit only in columns 0..17; the compressors of the
// high-order columns are exact, so the large weights are summed exactly.
//
// Schedule (this design's own, Dadda style, shared with the 8-bit tree):
// in each stage columns are handled from the least significant up. A
// column's bits are the COUTs of the exact compressors one column lower in
// the same stage, then its pool in order. While the column would hold more
// than the stage's target after counting the carries that arrive from
// below, it takes the first bits of its list into, in order of preference,
// an exact compressor with CIN (removes 4, exact region only), a 4:2
// compressor of the region (removes 3; an exact one then has CIN = 0), a
// full adder (removes 2) or a half adder (removes 1). Its pool for the next
// stage is: carries from the column below, then its own new sums, then its
// untouched bits. Inputs are wired in list order: an exact compressor with
// five inputs takes the first as CIN and the next four as A1..A4.
//
// Interface and timing: purely combinational, no clock or reset; z is valid
// one combinational delay after in and v.
//
// The instance list below follows mechanically from that schedule, cell by
// cell and stage by stage; net names give the stage and column (s2_c13_sum0
// is the first sum made in column 13 by stage 2).

// Cell count of this tree: ds_compressor42_n x16, ds_compressor42_p x10, exact_compressor42 x34, full_adder x7, half_adder x10, hs_compressor42 x35, inverter x14.

module extension16bit2 (
  input  logic [15:0] in, // multiplicand
  input  logic [15:0] v,  // multiplier
  output logic [32:0] z   // approximate product; z[32] is the final adder's carry
);

  // Partial products: pp[i][j] = v[i] & in[j], weight 2**(i+j).
  logic [15:0][15:0] pp;
  always_comb for (int i = 0; i < 16; i++) pp[i] = in & {16{v[i]}};

  logic s1_c8_sum0;
  logic s1_c8_car0;
  logic s1_c9_sum0;
  logic s1_c9_car0;
  logic s1_c10_sum0;
  logic s1_c10_car0;
  logic s1_c10_sum1;
  logic s1_c10_car1;
  logic s1_c11_sum0;
  logic s1_c11_car0;
  logic s1_c11_sum1;
  logic s1_c11_car1;
  logic s1_c12_sum0;
  logic s1_c12_car0;
  logic s1_c12_sum1;
  logic s1_c12_car1;
  logic s1_c12_sum2;
  logic s1_c12_car2;
  logic s1_c13_sum0;
  logic s1_c13_car0;
  logic s1_c13_sum1;
  logic s1_c13_car1;
  logic s1_c13_sum2;
  logic s1_c13_car2;
  logic s1_c14_sum0;
  logic s1_c14_car0;
  logic s1_c14_sum1;
  logic s1_c14_car1;
  logic s1_c14_sum2;
  logic s1_c14_car2;
  logic s1_c14_sum3;
  logic s1_c14_car3;
  logic s1_c15_sum0;
  logic s1_c15_car0;
  logic s1_c15_sum1;
  logic s1_c15_car1;
  logic s1_c15_sum2;
  logic s1_c15_car2;
  logic s1_c15_sum3;
  logic s1_c15_car3;
  logic s1_c16_sum0;
  logic s1_c16_car0;
  logic s1_c16_sum1;
  logic s1_c16_car1;
  logic s1_c16_sum2;
  logic s1_c16_car2;
  logic s1_c16_sum3;
  logic s1_c16_car3;
  logic s1_c17_sum0;
  logic s1_c17_car0;
  logic s1_c17_sum1;
  logic s1_c17_car1;
  logic s1_c17_sum2;
  logic s1_c17_car2;
  logic s1_c17_sum3;
  logic s1_c17_car3;
  logic s1_c18_sum0;
  logic s1_c18_car0;
  logic s1_c18_cout0;
  logic s1_c18_sum1;
  logic s1_c18_car1;
  logic s1_c18_cout1;
  logic s1_c18_sum2;
  logic s1_c18_car2;
  logic s1_c19_sum0;
  logic s1_c19_car0;
  logic s1_c19_cout0;
  logic s1_c19_sum1;
  logic s1_c19_car1;
  logic s1_c19_cout1;
  logic s1_c19_sum2;
  logic s1_c19_car2;
  logic s1_c20_sum0;
  logic s1_c20_car0;
  logic s1_c20_cout0;
  logic s1_c20_sum1;
  logic s1_c20_car1;
  logic s1_c20_cout1;
  logic s1_c21_sum0;
  logic s1_c21_car0;
  logic s1_c21_cout0;
  logic s1_c21_sum1;
  logic s1_c21_car1;
  logic s1_c22_sum0;
  logic s1_c22_car0;
  logic s1_c22_cout0;
  logic s1_c23_sum0;
  logic s1_c23_car0;
  logic s2_c4_sum0;
  logic s2_c4_car0;
  logic s2_c5_sum0;
  logic s2_c5_car0;
  logic s2_c6_sum0;
  logic s2_c6_car0;
  logic s2_c6_sum1;
  logic s2_c6_car1;
  logic s2_c7_sum0;
  logic s2_c7_car0;
  logic s2_c7_sum1;
  logic s2_c7_car1;
  logic s2_c8_sum0;
  logic s2_c8_car0;
  logic s2_c8_sum1;
  logic s2_c8_car1;
  logic s2_c9_sum0;
  logic s2_c9_car0;
  logic s2_c9_sum1;
  logic s2_c9_car1;
  logic s2_c10_sum0;
  logic s2_c10_car0;
  logic s2_c10_sum1;
  logic s2_c10_car1;
  logic s2_c11_sum0;
  logic s2_c11_car0;
  logic s2_c11_sum1;
  logic s2_c11_car1;
  logic s2_c12_sum0;
  logic s2_c12_car0;
  logic s2_c12_sum1;
  logic s2_c12_car1;
  logic s2_c13_sum0;
  logic s2_c13_car0;
  logic s1_c12_car2_i;
  logic s1_c12_car1_i;
  logic s1_c12_car0_i;
  logic s2_c13_sum1;
  logic s2_c13_car1;
  logic pp_13_0_i;
  logic pp_12_1_i;
  logic s2_c14_sum0;
  logic s2_c14_car0;
  logic s2_c14_sum1;
  logic s2_c14_car1;
  logic pp_14_0_i;
  logic s1_c14_sum3_i;
  logic s2_c15_sum0;
  logic s2_c15_car0;
  logic s1_c14_car3_i;
  logic s2_c15_sum1;
  logic s2_c15_car1;
  logic s2_c16_sum0;
  logic s2_c16_car0;
  logic s2_c16_sum1;
  logic s2_c16_car1;
  logic s1_c16_sum3_i;
  logic s2_c17_sum0;
  logic s2_c17_car0;
  logic s1_c16_car3_i;
  logic s2_c17_sum1;
  logic s2_c17_car1;
  logic s1_c17_sum3_i;
  logic s2_c18_sum0;
  logic s2_c18_car0;
  logic s2_c18_cout0;
  logic s1_c17_car2_i;
  logic s1_c17_car1_i;
  logic s1_c17_car0_i;
  logic s2_c18_sum1;
  logic s2_c18_car1;
  logic s2_c19_sum0;
  logic s2_c19_car0;
  logic s2_c19_cout0;
  logic s2_c19_sum1;
  logic s2_c19_car1;
  logic s2_c19_cout1;
  logic s2_c20_sum0;
  logic s2_c20_car0;
  logic s2_c20_cout0;
  logic s2_c20_sum1;
  logic s2_c20_car1;
  logic s2_c20_cout1;
  logic s2_c21_sum0;
  logic s2_c21_car0;
  logic s2_c21_cout0;
  logic s2_c21_sum1;
  logic s2_c21_car1;
  logic s2_c21_cout1;
  logic s2_c22_sum0;
  logic s2_c22_car0;
  logic s2_c22_cout0;
  logic s2_c22_sum1;
  logic s2_c22_car1;
  logic s2_c22_cout1;
  logic s2_c23_sum0;
  logic s2_c23_car0;
  logic s2_c23_cout0;
  logic s2_c23_sum1;
  logic s2_c23_car1;
  logic s2_c23_cout1;
  logic s2_c24_sum0;
  logic s2_c24_car0;
  logic s2_c24_cout0;
  logic s2_c24_sum1;
  logic s2_c24_car1;
  logic s2_c24_cout1;
  logic s2_c25_sum0;
  logic s2_c25_car0;
  logic s2_c25_cout0;
  logic s2_c25_sum1;
  logic s2_c25_car1;
  logic s2_c26_sum0;
  logic s2_c26_car0;
  logic s2_c26_cout0;
  logic s2_c27_sum0;
  logic s2_c27_car0;
  logic s3_c2_sum0;
  logic s3_c2_car0;
  logic s3_c3_sum0;
  logic s3_c3_car0;
  logic s3_c4_sum0;
  logic s3_c4_car0;
  logic s3_c5_sum0;
  logic s3_c5_car0;
  logic s3_c6_sum0;
  logic s3_c6_car0;
  logic s3_c7_sum0;
  logic s3_c7_car0;
  logic s3_c8_sum0;
  logic s3_c8_car0;
  logic s3_c9_sum0;
  logic s3_c9_car0;
  logic s3_c10_sum0;
  logic s3_c10_car0;
  logic s3_c11_sum0;
  logic s3_c11_car0;
  logic s3_c12_sum0;
  logic s3_c12_car0;
  logic s3_c13_sum0;
  logic s3_c13_car0;
  logic s3_c14_sum0;
  logic s3_c14_car0;
  logic s3_c15_sum0;
  logic s3_c15_car0;
  logic s3_c16_sum0;
  logic s3_c16_car0;
  logic s3_c17_sum0;
  logic s3_c17_car0;
  logic s3_c18_sum0;
  logic s3_c18_car0;
  logic s3_c18_cout0;
  logic s3_c19_sum0;
  logic s3_c19_car0;
  logic s3_c19_cout0;
  logic s3_c20_sum0;
  logic s3_c20_car0;
  logic s3_c20_cout0;
  logic s3_c21_sum0;
  logic s3_c21_car0;
  logic s3_c21_cout0;
  logic s3_c22_sum0;
  logic s3_c22_car0;
  logic s3_c22_cout0;
  logic s3_c23_sum0;
  logic s3_c23_car0;
  logic s3_c23_cout0;
  logic s3_c24_sum0;
  logic s3_c24_car0;
  logic s3_c24_cout0;
  logic s3_c25_sum0;
  logic s3_c25_car0;
  logic s3_c25_cout0;
  logic s3_c26_sum0;
  logic s3_c26_car0;
  logic s3_c26_cout0;
  logic s3_c27_sum0;
  logic s3_c27_car0;
  logic s3_c27_cout0;
  logic s3_c28_sum0;
  logic s3_c28_car0;
  logic s3_c28_cout0;
  logic s3_c29_sum0;
  logic s3_c29_car0;

  // ---- reduction stage 1: every column down to 8 bits ----
  half_adder u_s1_c8_sum0 (.a(pp[0][8]), .b(pp[1][7]), .s(s1_c8_sum0), .cout(s1_c8_car0));
  hs_compressor42 u_s1_c9_sum0 (.v({pp[3][6], pp[2][7], pp[1][8], pp[0][9]}), .ca(s1_c9_car0), .su(s1_c9_sum0));
  hs_compressor42 u_s1_c10_sum0 (.v({pp[3][7], pp[2][8], pp[1][9], pp[0][10]}), .ca(s1_c10_car0), .su(s1_c10_sum0));
  half_adder u_s1_c10_sum1 (.a(pp[4][6]), .b(pp[5][5]), .s(s1_c10_sum1), .cout(s1_c10_car1));
  hs_compressor42 u_s1_c11_sum0 (.v({pp[3][8], pp[2][9], pp[1][10], pp[0][11]}), .ca(s1_c11_car0), .su(s1_c11_sum0));
  hs_compressor42 u_s1_c11_sum1 (.v({pp[7][4], pp[6][5], pp[5][6], pp[4][7]}), .ca(s1_c11_car1), .su(s1_c11_sum1));
  hs_compressor42 u_s1_c12_sum0 (.v({pp[3][9], pp[2][10], pp[1][11], pp[0][12]}), .ca(s1_c12_car0), .su(s1_c12_sum0));
  hs_compressor42 u_s1_c12_sum1 (.v({pp[7][5], pp[6][6], pp[5][7], pp[4][8]}), .ca(s1_c12_car1), .su(s1_c12_sum1));
  half_adder u_s1_c12_sum2 (.a(pp[8][4]), .b(pp[9][3]), .s(s1_c12_sum2), .cout(s1_c12_car2));
  ds_compressor42_n u_s1_c13_sum0 (.v({pp[3][10], pp[2][11], pp[1][12], pp[0][13]}), .ca_n(s1_c13_car0), .su_n(s1_c13_sum0));
  ds_compressor42_n u_s1_c13_sum1 (.v({pp[7][6], pp[6][7], pp[5][8], pp[4][9]}), .ca_n(s1_c13_car1), .su_n(s1_c13_sum1));
  ds_compressor42_n u_s1_c13_sum2 (.v({pp[11][2], pp[10][3], pp[9][4], pp[8][5]}), .ca_n(s1_c13_car2), .su_n(s1_c13_sum2));
  ds_compressor42_n u_s1_c14_sum0 (.v({pp[3][11], pp[2][12], pp[1][13], pp[0][14]}), .ca_n(s1_c14_car0), .su_n(s1_c14_sum0));
  ds_compressor42_n u_s1_c14_sum1 (.v({pp[7][7], pp[6][8], pp[5][9], pp[4][10]}), .ca_n(s1_c14_car1), .su_n(s1_c14_sum1));
  ds_compressor42_n u_s1_c14_sum2 (.v({pp[11][3], pp[10][4], pp[9][5], pp[8][6]}), .ca_n(s1_c14_car2), .su_n(s1_c14_sum2));
  half_adder u_s1_c14_sum3 (.a(pp[12][2]), .b(pp[13][1]), .s(s1_c14_sum3), .cout(s1_c14_car3));
  ds_compressor42_n u_s1_c15_sum0 (.v({pp[3][12], pp[2][13], pp[1][14], pp[0][15]}), .ca_n(s1_c15_car0), .su_n(s1_c15_sum0));
  ds_compressor42_n u_s1_c15_sum1 (.v({pp[7][8], pp[6][9], pp[5][10], pp[4][11]}), .ca_n(s1_c15_car1), .su_n(s1_c15_sum1));
  ds_compressor42_n u_s1_c15_sum2 (.v({pp[11][4], pp[10][5], pp[9][6], pp[8][7]}), .ca_n(s1_c15_car2), .su_n(s1_c15_sum2));
  ds_compressor42_n u_s1_c15_sum3 (.v({pp[15][0], pp[14][1], pp[13][2], pp[12][3]}), .ca_n(s1_c15_car3), .su_n(s1_c15_sum3));
  ds_compressor42_n u_s1_c16_sum0 (.v({pp[4][12], pp[3][13], pp[2][14], pp[1][15]}), .ca_n(s1_c16_car0), .su_n(s1_c16_sum0));
  ds_compressor42_n u_s1_c16_sum1 (.v({pp[8][8], pp[7][9], pp[6][10], pp[5][11]}), .ca_n(s1_c16_car1), .su_n(s1_c16_sum1));
  ds_compressor42_n u_s1_c16_sum2 (.v({pp[12][4], pp[11][5], pp[10][6], pp[9][7]}), .ca_n(s1_c16_car2), .su_n(s1_c16_sum2));
  full_adder u_s1_c16_sum3 (.a(pp[13][3]), .b(pp[14][2]), .c(pp[15][1]), .s(s1_c16_sum3), .cout(s1_c16_car3));
  ds_compressor42_n u_s1_c17_sum0 (.v({pp[5][12], pp[4][13], pp[3][14], pp[2][15]}), .ca_n(s1_c17_car0), .su_n(s1_c17_sum0));
  ds_compressor42_n u_s1_c17_sum1 (.v({pp[9][8], pp[8][9], pp[7][10], pp[6][11]}), .ca_n(s1_c17_car1), .su_n(s1_c17_sum1));
  ds_compressor42_n u_s1_c17_sum2 (.v({pp[13][4], pp[12][5], pp[11][6], pp[10][7]}), .ca_n(s1_c17_car2), .su_n(s1_c17_sum2));
  half_adder u_s1_c17_sum3 (.a(pp[14][3]), .b(pp[15][2]), .s(s1_c17_sum3), .cout(s1_c17_car3));
  exact_compressor42 u_s1_c18_sum0 (.a({pp[7][11], pp[6][12], pp[5][13], pp[4][14]}), .cin(pp[3][15]), .cout(s1_c18_cout0), .carry(s1_c18_car0), .sum(s1_c18_sum0));
  exact_compressor42 u_s1_c18_sum1 (.a({pp[12][6], pp[11][7], pp[10][8], pp[9][9]}), .cin(pp[8][10]), .cout(s1_c18_cout1), .carry(s1_c18_car1), .sum(s1_c18_sum1));
  half_adder u_s1_c18_sum2 (.a(pp[13][5]), .b(pp[14][4]), .s(s1_c18_sum2), .cout(s1_c18_car2));
  exact_compressor42 u_s1_c19_sum0 (.a({pp[6][13], pp[5][14], pp[4][15], s1_c18_cout1}), .cin(s1_c18_cout0), .cout(s1_c19_cout0), .carry(s1_c19_car0), .sum(s1_c19_sum0));
  exact_compressor42 u_s1_c19_sum1 (.a({pp[11][8], pp[10][9], pp[9][10], pp[8][11]}), .cin(pp[7][12]), .cout(s1_c19_cout1), .carry(s1_c19_car1), .sum(s1_c19_sum1));
  half_adder u_s1_c19_sum2 (.a(pp[12][7]), .b(pp[13][6]), .s(s1_c19_sum2), .cout(s1_c19_car2));
  exact_compressor42 u_s1_c20_sum0 (.a({pp[7][13], pp[6][14], pp[5][15], s1_c19_cout1}), .cin(s1_c19_cout0), .cout(s1_c20_cout0), .carry(s1_c20_car0), .sum(s1_c20_sum0));
  exact_compressor42 u_s1_c20_sum1 (.a({pp[12][8], pp[11][9], pp[10][10], pp[9][11]}), .cin(pp[8][12]), .cout(s1_c20_cout1), .carry(s1_c20_car1), .sum(s1_c20_sum1));
  exact_compressor42 u_s1_c21_sum0 (.a({pp[8][13], pp[7][14], pp[6][15], s1_c20_cout1}), .cin(s1_c20_cout0), .cout(s1_c21_cout0), .carry(s1_c21_car0), .sum(s1_c21_sum0));
  full_adder u_s1_c21_sum1 (.a(pp[9][12]), .b(pp[10][11]), .c(pp[11][10]), .s(s1_c21_sum1), .cout(s1_c21_car1));
  exact_compressor42 u_s1_c22_sum0 (.a({pp[10][12], pp[9][13], pp[8][14], pp[7][15]}), .cin(s1_c21_cout0), .cout(s1_c22_cout0), .carry(s1_c22_car0), .sum(s1_c22_sum0));
  full_adder u_s1_c23_sum0 (.a(s1_c22_cout0), .b(pp[8][15]), .c(pp[9][14]), .s(s1_c23_sum0), .cout(s1_c23_car0));

  // ---- reduction stage 2: every column down to 4 bits ----
  half_adder u_s2_c4_sum0 (.a(pp[0][4]), .b(pp[1][3]), .s(s2_c4_sum0), .cout(s2_c4_car0));
  hs_compressor42 u_s2_c5_sum0 (.v({pp[3][2], pp[2][3], pp[1][4], pp[0][5]}), .ca(s2_c5_car0), .su(s2_c5_sum0));
  hs_compressor42 u_s2_c6_sum0 (.v({pp[3][3], pp[2][4], pp[1][5], pp[0][6]}), .ca(s2_c6_car0), .su(s2_c6_sum0));
  half_adder u_s2_c6_sum1 (.a(pp[4][2]), .b(pp[5][1]), .s(s2_c6_sum1), .cout(s2_c6_car1));
  hs_compressor42 u_s2_c7_sum0 (.v({pp[3][4], pp[2][5], pp[1][6], pp[0][7]}), .ca(s2_c7_car0), .su(s2_c7_sum0));
  hs_compressor42 u_s2_c7_sum1 (.v({pp[7][0], pp[6][1], pp[5][2], pp[4][3]}), .ca(s2_c7_car1), .su(s2_c7_sum1));
  hs_compressor42 u_s2_c8_sum0 (.v({pp[4][4], pp[3][5], pp[2][6], s1_c8_sum0}), .ca(s2_c8_car0), .su(s2_c8_sum0));
  hs_compressor42 u_s2_c8_sum1 (.v({pp[8][0], pp[7][1], pp[6][2], pp[5][3]}), .ca(s2_c8_car1), .su(s2_c8_sum1));
  hs_compressor42 u_s2_c9_sum0 (.v({pp[5][4], pp[4][5], s1_c9_sum0, s1_c8_car0}), .ca(s2_c9_car0), .su(s2_c9_sum0));
  hs_compressor42 u_s2_c9_sum1 (.v({pp[9][0], pp[8][1], pp[7][2], pp[6][3]}), .ca(s2_c9_car1), .su(s2_c9_sum1));
  hs_compressor42 u_s2_c10_sum0 (.v({pp[6][4], s1_c10_sum1, s1_c10_sum0, s1_c9_car0}), .ca(s2_c10_car0), .su(s2_c10_sum0));
  hs_compressor42 u_s2_c10_sum1 (.v({pp[10][0], pp[9][1], pp[8][2], pp[7][3]}), .ca(s2_c10_car1), .su(s2_c10_sum1));
  hs_compressor42 u_s2_c11_sum0 (.v({s1_c11_sum1, s1_c11_sum0, s1_c10_car1, s1_c10_car0}), .ca(s2_c11_car0), .su(s2_c11_sum0));
  hs_compressor42 u_s2_c11_sum1 (.v({pp[11][0], pp[10][1], pp[9][2], pp[8][3]}), .ca(s2_c11_car1), .su(s2_c11_sum1));
  hs_compressor42 u_s2_c12_sum0 (.v({s1_c12_sum1, s1_c12_sum0, s1_c11_car1, s1_c11_car0}), .ca(s2_c12_car0), .su(s2_c12_sum0));
  hs_compressor42 u_s2_c12_sum1 (.v({pp[12][0], pp[11][1], pp[10][2], s1_c12_sum2}), .ca(s2_c12_car1), .su(s2_c12_sum1));
  assign s1_c12_car2_i = ~s1_c12_car2;
  assign s1_c12_car1_i = ~s1_c12_car1;
  assign s1_c12_car0_i = ~s1_c12_car0;
  ds_compressor42_p u_s2_c13_sum0 (.v_n({s1_c13_sum0, s1_c12_car2_i, s1_c12_car1_i, s1_c12_car0_i}), .ca(s2_c13_car0), .su(s2_c13_sum0));
  assign pp_13_0_i = ~pp[13][0];
  assign pp_12_1_i = ~pp[12][1];
  ds_compressor42_p u_s2_c13_sum1 (.v_n({pp_13_0_i, pp_12_1_i, s1_c13_sum2, s1_c13_sum1}), .ca(s2_c13_car1), .su(s2_c13_sum1));
  ds_compressor42_p u_s2_c14_sum0 (.v_n({s1_c14_sum0, s1_c13_car2, s1_c13_car1, s1_c13_car0}), .ca(s2_c14_car0), .su(s2_c14_sum0));
  assign pp_14_0_i = ~pp[14][0];
  assign s1_c14_sum3_i = ~s1_c14_sum3;
  ds_compressor42_p u_s2_c14_sum1 (.v_n({pp_14_0_i, s1_c14_sum3_i, s1_c14_sum2, s1_c14_sum1}), .ca(s2_c14_car1), .su(s2_c14_sum1));
  assign s1_c14_car3_i = ~s1_c14_car3;
  ds_compressor42_p u_s2_c15_sum0 (.v_n({s1_c14_car3_i, s1_c14_car2, s1_c14_car1, s1_c14_car0}), .ca(s2_c15_car0), .su(s2_c15_sum0));
  ds_compressor42_p u_s2_c15_sum1 (.v_n({s1_c15_sum3, s1_c15_sum2, s1_c15_sum1, s1_c15_sum0}), .ca(s2_c15_car1), .su(s2_c15_sum1));
  ds_compressor42_p u_s2_c16_sum0 (.v_n({s1_c15_car3, s1_c15_car2, s1_c15_car1, s1_c15_car0}), .ca(s2_c16_car0), .su(s2_c16_sum0));
  assign s1_c16_sum3_i = ~s1_c16_sum3;
  ds_compressor42_p u_s2_c16_sum1 (.v_n({s1_c16_sum3_i, s1_c16_sum2, s1_c16_sum1, s1_c16_sum0}), .ca(s2_c16_car1), .su(s2_c16_sum1));
  assign s1_c16_car3_i = ~s1_c16_car3;
  ds_compressor42_p u_s2_c17_sum0 (.v_n({s1_c16_car3_i, s1_c16_car2, s1_c16_car1, s1_c16_car0}), .ca(s2_c17_car0), .su(s2_c17_sum0));
  assign s1_c17_sum3_i = ~s1_c17_sum3;
  ds_compressor42_p u_s2_c17_sum1 (.v_n({s1_c17_sum3_i, s1_c17_sum2, s1_c17_sum1, s1_c17_sum0}), .ca(s2_c17_car1), .su(s2_c17_sum1));
  assign s1_c17_car2_i = ~s1_c17_car2;
  assign s1_c17_car1_i = ~s1_c17_car1;
  assign s1_c17_car0_i = ~s1_c17_car0;
  exact_compressor42 u_s2_c18_sum0 (.a({s1_c18_sum0, s1_c17_car3, s1_c17_car2_i, s1_c17_car1_i}), .cin(s1_c17_car0_i), .cout(s2_c18_cout0), .carry(s2_c18_car0), .sum(s2_c18_sum0));
  full_adder u_s2_c18_sum1 (.a(s1_c18_sum1), .b(s1_c18_sum2), .c(pp[15][3]), .s(s2_c18_sum1), .cout(s2_c18_car1));
  exact_compressor42 u_s2_c19_sum0 (.a({s1_c19_sum0, s1_c18_car2, s1_c18_car1, s1_c18_car0}), .cin(s2_c18_cout0), .cout(s2_c19_cout0), .carry(s2_c19_car0), .sum(s2_c19_sum0));
  exact_compressor42 u_s2_c19_sum1 (.a({pp[15][4], pp[14][5], s1_c19_sum2, s1_c19_sum1}), .cin(1'b0), .cout(s2_c19_cout1), .carry(s2_c19_car1), .sum(s2_c19_sum1));
  exact_compressor42 u_s2_c20_sum0 (.a({s1_c19_car2, s1_c19_car1, s1_c19_car0, s2_c19_cout1}), .cin(s2_c19_cout0), .cout(s2_c20_cout0), .carry(s2_c20_car0), .sum(s2_c20_sum0));
  exact_compressor42 u_s2_c20_sum1 (.a({pp[15][5], pp[14][6], pp[13][7], s1_c20_sum1}), .cin(s1_c20_sum0), .cout(s2_c20_cout1), .carry(s2_c20_car1), .sum(s2_c20_sum1));
  exact_compressor42 u_s2_c21_sum0 (.a({s1_c21_sum0, s1_c20_car1, s1_c20_car0, s2_c20_cout1}), .cin(s2_c20_cout0), .cout(s2_c21_cout0), .carry(s2_c21_car0), .sum(s2_c21_sum0));
  exact_compressor42 u_s2_c21_sum1 (.a({pp[15][6], pp[14][7], pp[13][8], pp[12][9]}), .cin(s1_c21_sum1), .cout(s2_c21_cout1), .carry(s2_c21_car1), .sum(s2_c21_sum1));
  exact_compressor42 u_s2_c22_sum0 (.a({s1_c22_sum0, s1_c21_car1, s1_c21_car0, s2_c21_cout1}), .cin(s2_c21_cout0), .cout(s2_c22_cout0), .carry(s2_c22_car0), .sum(s2_c22_sum0));
  exact_compressor42 u_s2_c22_sum1 (.a({pp[15][7], pp[14][8], pp[13][9], pp[12][10]}), .cin(pp[11][11]), .cout(s2_c22_cout1), .carry(s2_c22_car1), .sum(s2_c22_sum1));
  exact_compressor42 u_s2_c23_sum0 (.a({pp[10][13], s1_c23_sum0, s1_c22_car0, s2_c22_cout1}), .cin(s2_c22_cout0), .cout(s2_c23_cout0), .carry(s2_c23_car0), .sum(s2_c23_sum0));
  exact_compressor42 u_s2_c23_sum1 (.a({pp[15][8], pp[14][9], pp[13][10], pp[12][11]}), .cin(pp[11][12]), .cout(s2_c23_cout1), .carry(s2_c23_car1), .sum(s2_c23_sum1));
  exact_compressor42 u_s2_c24_sum0 (.a({pp[10][14], pp[9][15], s1_c23_car0, s2_c23_cout1}), .cin(s2_c23_cout0), .cout(s2_c24_cout0), .carry(s2_c24_car0), .sum(s2_c24_sum0));
  exact_compressor42 u_s2_c24_sum1 (.a({pp[15][9], pp[14][10], pp[13][11], pp[12][12]}), .cin(pp[11][13]), .cout(s2_c24_cout1), .carry(s2_c24_car1), .sum(s2_c24_sum1));
  exact_compressor42 u_s2_c25_sum0 (.a({pp[12][13], pp[11][14], pp[10][15], s2_c24_cout1}), .cin(s2_c24_cout0), .cout(s2_c25_cout0), .carry(s2_c25_car0), .sum(s2_c25_sum0));
  full_adder u_s2_c25_sum1 (.a(pp[13][12]), .b(pp[14][11]), .c(pp[15][10]), .s(s2_c25_sum1), .cout(s2_c25_car1));
  exact_compressor42 u_s2_c26_sum0 (.a({pp[14][12], pp[13][13], pp[12][14], pp[11][15]}), .cin(s2_c25_cout0), .cout(s2_c26_cout0), .carry(s2_c26_car0), .sum(s2_c26_sum0));
  full_adder u_s2_c27_sum0 (.a(s2_c26_cout0), .b(pp[12][15]), .c(pp[13][14]), .s(s2_c27_sum0), .cout(s2_c27_car0));

  // ---- reduction stage 3: every column down to 2 bits ----
  half_adder u_s3_c2_sum0 (.a(pp[0][2]), .b(pp[1][1]), .s(s3_c2_sum0), .cout(s3_c2_car0));
  hs_compressor42 u_s3_c3_sum0 (.v({pp[3][0], pp[2][1], pp[1][2], pp[0][3]}), .ca(s3_c3_car0), .su(s3_c3_sum0));
  hs_compressor42 u_s3_c4_sum0 (.v({pp[4][0], pp[3][1], pp[2][2], s2_c4_sum0}), .ca(s3_c4_car0), .su(s3_c4_sum0));
  hs_compressor42 u_s3_c5_sum0 (.v({pp[5][0], pp[4][1], s2_c5_sum0, s2_c4_car0}), .ca(s3_c5_car0), .su(s3_c5_sum0));
  hs_compressor42 u_s3_c6_sum0 (.v({pp[6][0], s2_c6_sum1, s2_c6_sum0, s2_c5_car0}), .ca(s3_c6_car0), .su(s3_c6_sum0));
  hs_compressor42 u_s3_c7_sum0 (.v({s2_c7_sum1, s2_c7_sum0, s2_c6_car1, s2_c6_car0}), .ca(s3_c7_car0), .su(s3_c7_sum0));
  hs_compressor42 u_s3_c8_sum0 (.v({s2_c8_sum1, s2_c8_sum0, s2_c7_car1, s2_c7_car0}), .ca(s3_c8_car0), .su(s3_c8_sum0));
  hs_compressor42 u_s3_c9_sum0 (.v({s2_c9_sum1, s2_c9_sum0, s2_c8_car1, s2_c8_car0}), .ca(s3_c9_car0), .su(s3_c9_sum0));
  hs_compressor42 u_s3_c10_sum0 (.v({s2_c10_sum1, s2_c10_sum0, s2_c9_car1, s2_c9_car0}), .ca(s3_c10_car0), .su(s3_c10_sum0));
  hs_compressor42 u_s3_c11_sum0 (.v({s2_c11_sum1, s2_c11_sum0, s2_c10_car1, s2_c10_car0}), .ca(s3_c11_car0), .su(s3_c11_sum0));
  hs_compressor42 u_s3_c12_sum0 (.v({s2_c12_sum1, s2_c12_sum0, s2_c11_car1, s2_c11_car0}), .ca(s3_c12_car0), .su(s3_c12_sum0));
  hs_compressor42 u_s3_c13_sum0 (.v({s2_c13_sum1, s2_c13_sum0, s2_c12_car1, s2_c12_car0}), .ca(s3_c13_car0), .su(s3_c13_sum0));
  hs_compressor42 u_s3_c14_sum0 (.v({s2_c14_sum1, s2_c14_sum0, s2_c13_car1, s2_c13_car0}), .ca(s3_c14_car0), .su(s3_c14_sum0));
  hs_compressor42 u_s3_c15_sum0 (.v({s2_c15_sum1, s2_c15_sum0, s2_c14_car1, s2_c14_car0}), .ca(s3_c15_car0), .su(s3_c15_sum0));
  hs_compressor42 u_s3_c16_sum0 (.v({s2_c16_sum1, s2_c16_sum0, s2_c15_car1, s2_c15_car0}), .ca(s3_c16_car0), .su(s3_c16_sum0));
  hs_compressor42 u_s3_c17_sum0 (.v({s2_c17_sum1, s2_c17_sum0, s2_c16_car1, s2_c16_car0}), .ca(s3_c17_car0), .su(s3_c17_sum0));
  exact_compressor42 u_s3_c18_sum0 (.a({s2_c18_sum1, s2_c18_sum0, s2_c17_car1, s2_c17_car0}), .cin(1'b0), .cout(s3_c18_cout0), .carry(s3_c18_car0), .sum(s3_c18_sum0));
  exact_compressor42 u_s3_c19_sum0 (.a({s2_c19_sum1, s2_c19_sum0, s2_c18_car1, s2_c18_car0}), .cin(s3_c18_cout0), .cout(s3_c19_cout0), .carry(s3_c19_car0), .sum(s3_c19_sum0));
  exact_compressor42 u_s3_c20_sum0 (.a({s2_c20_sum1, s2_c20_sum0, s2_c19_car1, s2_c19_car0}), .cin(s3_c19_cout0), .cout(s3_c20_cout0), .carry(s3_c20_car0), .sum(s3_c20_sum0));
  exact_compressor42 u_s3_c21_sum0 (.a({s2_c21_sum1, s2_c21_sum0, s2_c20_car1, s2_c20_car0}), .cin(s3_c20_cout0), .cout(s3_c21_cout0), .carry(s3_c21_car0), .sum(s3_c21_sum0));
  exact_compressor42 u_s3_c22_sum0 (.a({s2_c22_sum1, s2_c22_sum0, s2_c21_car1, s2_c21_car0}), .cin(s3_c21_cout0), .cout(s3_c22_cout0), .carry(s3_c22_car0), .sum(s3_c22_sum0));
  exact_compressor42 u_s3_c23_sum0 (.a({s2_c23_sum1, s2_c23_sum0, s2_c22_car1, s2_c22_car0}), .cin(s3_c22_cout0), .cout(s3_c23_cout0), .carry(s3_c23_car0), .sum(s3_c23_sum0));
  exact_compressor42 u_s3_c24_sum0 (.a({s2_c24_sum1, s2_c24_sum0, s2_c23_car1, s2_c23_car0}), .cin(s3_c23_cout0), .cout(s3_c24_cout0), .carry(s3_c24_car0), .sum(s3_c24_sum0));
  exact_compressor42 u_s3_c25_sum0 (.a({s2_c25_sum1, s2_c25_sum0, s2_c24_car1, s2_c24_car0}), .cin(s3_c24_cout0), .cout(s3_c25_cout0), .carry(s3_c25_car0), .sum(s3_c25_sum0));
  exact_compressor42 u_s3_c26_sum0 (.a({pp[15][11], s2_c26_sum0, s2_c25_car1, s2_c25_car0}), .cin(s3_c25_cout0), .cout(s3_c26_cout0), .carry(s3_c26_car0), .sum(s3_c26_sum0));
  exact_compressor42 u_s3_c27_sum0 (.a({pp[15][12], pp[14][13], s2_c27_sum0, s2_c26_car0}), .cin(s3_c26_cout0), .cout(s3_c27_cout0), .carry(s3_c27_car0), .sum(s3_c27_sum0));
  exact_compressor42 u_s3_c28_sum0 (.a({pp[15][13], pp[14][14], pp[13][15], s2_c27_car0}), .cin(s3_c27_cout0), .cout(s3_c28_cout0), .carry(s3_c28_car0), .sum(s3_c28_sum0));
  full_adder u_s3_c29_sum0 (.a(s3_c28_cout0), .b(pp[14][15]), .c(pp[15][14]), .s(s3_c29_sum0), .cout(s3_c29_car0));

  // ---- final ripple-carry adder of the two remaining rows ----
  logic [31:0] row_x, row_y;
  assign row_x = {1'b0, s3_c29_car0, s3_c28_car0, s3_c27_car0, s3_c26_car0, s3_c25_car0, s3_c24_car0, s3_c23_car0, s3_c22_car0, s3_c21_car0, s3_c20_car0, s3_c19_car0, s3_c18_car0, s3_c17_car0, s3_c16_car0, s3_c15_car0, s3_c14_car0, s3_c13_car0, s3_c12_car0, s3_c11_car0, s3_c10_car0, s3_c9_car0, s3_c8_car0, s3_c7_car0, s3_c6_car0, s3_c5_car0, s3_c4_car0, s3_c3_car0, s3_c2_car0, s3_c2_sum0, pp[0][1], pp[0][0]};
  assign row_y = {1'b0, pp[15][15], s3_c29_sum0, s3_c28_sum0, s3_c27_sum0, s3_c26_sum0, s3_c25_sum0, s3_c24_sum0, s3_c23_sum0, s3_c22_sum0, s3_c21_sum0, s3_c20_sum0, s3_c19_sum0, s3_c18_sum0, s3_c17_sum0, s3_c16_sum0, s3_c15_sum0, s3_c14_sum0, s3_c13_sum0, s3_c12_sum0, s3_c11_sum0, s3_c10_sum0, s3_c9_sum0, s3_c8_sum0, s3_c7_sum0, s3_c6_sum0, s3_c5_sum0, s3_c4_sum0, s3_c3_sum0, pp[2][0], pp[1][0], 1'b0};
  rca #(.W(32)) u_final (.x(row_x), .y(row_y), .s(z));
endmodule
