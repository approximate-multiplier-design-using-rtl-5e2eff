// Modified dual-stage compressor, second stage (complemented inputs).
// It receives the complements of four bits, as produced by
// ds_compressor42_n, and returns the true carry and sum of the high-speed
// compressor for those four bits. By De Morgan the gates swap roles: NAND of
// the complemented v1,v2 gives v1 | v2, the XOR of two complemented bits
// equals the XOR of the true bits, and the NOR / NAND of the complemented
// v3,v4 give v3 & v4 / v3 | v4:
//   ca = ~(vn1 & vn2)
//   su = (vn1 ^ vn2) ? ~(vn3 | vn4) : ~(vn3 & vn4)
// The published text says only that cascading the inverting compressor in
// multiples of two removes the inversion; this gate-level form of the second
// stage is this design's own. Combinational, no clock.
module ds_compressor42_p (
  input  logic [3:0] v_n,  // complemented inputs ~v1..~v4
  output logic       ca,   // true carry, weight 2
  output logic       su    // true sum, weight 1
);
  logic sel;

  always_comb begin
    sel = v_n[0] ^ v_n[1];
    ca  = ~(v_n[0] & v_n[1]);
    su  = sel ? ~(v_n[2] | v_n[3]) : ~(v_n[2] & v_n[3]);
  end
endmodule
