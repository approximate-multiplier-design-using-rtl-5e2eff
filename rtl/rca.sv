// Ripple-carry adder: s = x + y, with the final carry as s[W].
// A chain of W full adders, the first with carry-in 0. It is the final
// adder that turns the two rows left by a multiplier's reduction tree into
// the product. The adder type follows the published description; the width
// parameter is this design's. Combinational, no clock.
module rca #(
  parameter int W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W:0]   s
);
  logic [W:0] c;

  assign c[0] = 1'b0;
  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(x[i]), .b(y[i]), .c(c[i]), .s(s[i]), .cout(c[i+1]));
  end
  assign s[W] = c[W];
endmodule
