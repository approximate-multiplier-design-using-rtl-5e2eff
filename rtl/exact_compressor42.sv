// Exact 4:2 compressor (five inputs, three outputs).
// Two full adders in cascade: the first adds A1, A2, A3 and gives COUT and an
// intermediate sum; the second adds that sum, A4 and CIN and gives CARRY and
// SUM. So a[0]+a[1]+a[2]+a[3]+cin = sum + 2*(carry + cout) for every input.
// COUT does not depend on CIN, so a row of these compressors can pass COUT
// of column x to CIN of column x+1 without a ripple path. The wiring of the
// two adders follows the published block diagram; the port packing a[0..3] =
// A1..A4 is this design's choice. Combinational, no clock.
module exact_compressor42 (
  input  logic [3:0] a,     // A1..A4
  input  logic       cin,   // COUT of the compressor one column lower
  output logic       cout,  // weight 2, to CIN of the next column
  output logic       carry, // weight 2, to the next reduction stage
  output logic       sum    // weight 1
);
  logic s_mid;

  full_adder u_fa0 (.a(a[0]), .b(a[1]), .c(a[2]), .s(s_mid), .cout(cout));
  full_adder u_fa1 (.a(s_mid), .b(a[3]), .c(cin), .s(sum), .cout(carry));
endmodule
