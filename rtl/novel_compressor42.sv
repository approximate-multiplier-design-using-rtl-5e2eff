// New approximate 4:2 compressor with four inputs and two outputs.
// A full adder adds a0, a1, a2 and gives c0 and s0; a half adder adds s0 and
// a3 and gives the sum s1 and a carry; the output carry is the OR of c0 and
// the half-adder carry. The OR replaces the adder that an exact compressor
// needs, and there is no carry chain to the neighbouring column. Both carries
// are 1 only when all four inputs are 1, so 2*cout + s1 equals a0+a1+a2+a3
// for every input except 1111, where it gives 2 instead of 4. The structure
// follows the published block diagram. Combinational, no clock.
module novel_compressor42 (
  input  logic [3:0] a,     // a0..a3
  output logic       cout,  // carry, weight 2
  output logic       s1     // sum, weight 1
);
  logic s0, c0, c1;

  full_adder u_fa (.a(a[0]), .b(a[1]), .c(a[2]), .s(s0), .cout(c0));
  half_adder u_ha (.a(s0), .b(a[3]), .s(s1), .cout(c1));

  always_comb cout = c0 | c1;
endmodule
