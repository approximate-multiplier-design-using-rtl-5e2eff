// Top level: the two approximate Dadda multipliers side by side.
// u_m8 is the 8x8 multiplier built on the new approximate 4:2 compressor;
// u_m16 is the 16x16 multiplier that mixes exact, dual-stage and high-speed
// compressors by column. They share nothing; each has its own operands and
// product. Products carry one extra bit, the final adder's carry. All
// unsigned, purely combinational, no clock or reset.
module approx_mult_top (
  input  logic [7:0]  a8,   // 8-bit multiplicand
  input  logic [7:0]  b8,   // 8-bit multiplier
  output logic [16:0] p8,   // approximate 8x8 product
  input  logic [15:0] in,   // 16-bit multiplicand
  input  logic [15:0] v,    // 16-bit multiplier
  output logic [32:0] z     // approximate 16x16 product
);
  dadda_mult8     u_m8  (.a(a8), .b(b8), .p(p8));
  extension16bit2 u_m16 (.in(in), .v(v), .z(z));
endmodule
