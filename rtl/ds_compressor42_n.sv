// Modified dual-stage compressor, first stage (complemented outputs).
// The high-speed compressor rebuilt with inverting gates: NOR of v1,v2 for
// the carry, and a multiplexer selected by v1 ^ v2 that picks the NAND of
// v3,v4 when the select is high and their NOR when it is low. Its outputs are
// therefore the complements of the high-speed compressor's:
//   ca_n = ~(v1 | v2)
//   su_n = (v1 ^ v2) ? ~(v3 & v4) : ~(v3 | v4)
// They are meant to feed ds_compressor42_p in the next reduction stage,
// which takes complemented inputs, so that a pair of stages restores true
// polarity. The inverting gates follow the published block diagram; which
// multiplexer input the select picks when high is taken over from the
// high-speed compressor. Combinational, no clock.
module ds_compressor42_n (
  input  logic [3:0] v,     // true-polarity inputs v1..v4
  output logic       ca_n,  // complemented carry, weight 2
  output logic       su_n   // complemented sum, weight 1
);
  logic sel;

  always_comb begin
    sel  = v[0] ^ v[1];
    ca_n = ~(v[0] | v[1]);
    su_n = sel ? ~(v[2] & v[3]) : ~(v[2] | v[3]);
  end
endmodule
