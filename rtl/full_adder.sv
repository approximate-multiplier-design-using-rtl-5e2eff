// One-bit full adder: a + b + c = 2*cout + s.
// Purely combinational, no clock. It is the building block of the exact 4:2
// compressor, of the new approximate compressor and of the reduction trees
// (where a column needs to lose two bits) and the final ripple-carry adder.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic cout
);
  always_comb begin
    s    = a ^ b ^ c;
    cout = (a & b) | (c & (a ^ b));
  end
endmodule
