// One-bit half adder: a + b = 2*cout + s.
// Purely combinational. Used inside the new approximate compressor and in
// the reduction trees where a column is one bit too high.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic cout
);
  always_comb begin
    s    = a ^ b;
    cout = a & b;
  end
endmodule
