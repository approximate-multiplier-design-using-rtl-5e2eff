// High-speed, area-efficient approximate 4:2 compressor.
// Four inputs v1..v4, two outputs, no carry chain:
//   ca = v1 | v2
//   su = (v1 ^ v2) ? (v3 & v4) : (v3 | v4)
// The XOR of v1,v2 drives the select of a 2:1 multiplexer that picks the AND
// of v3,v4 when high and the OR when low. 2*ca + su equals v1+v2+v3+v4 for
// twelve of the sixteen inputs; it is one too small for 0011 and 1111 and one
// too large for 0100 and 1000 (inputs written v1 v2 v3 v4), so the error is
// balanced. Equations and truth table follow the published design exactly.
// Combinational, no clock.
module hs_compressor42 (
  input  logic [3:0] v,   // v[0]=v1 .. v[3]=v4
  output logic       ca,  // carry, weight 2
  output logic       su   // sum, weight 1
);
  logic sel;

  always_comb begin
    sel = v[0] ^ v[1];
    ca  = v[0] | v[1];
    su  = sel ? (v[2] & v[3]) : (v[2] | v[3]);
  end
endmodule
