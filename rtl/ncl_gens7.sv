// ncl_gens7 - dual-rail generator of the multiplier's most significant product bit.
//
// Computes s = c XOR maj(x, y, z): the majority m is the carry out of the last column-6 addition
// (two TH23 gates per rail) and c is the column-7 carry of the second reduction level; the two can
// never both be 1 in a 4x4 product, so s is their sum without a further carry. m is formed here
// rather than taken from the column-6 full adder, as in the design's cell of this name; the XOR is
// two TH24comp gates. The insides are this design's choice. Combinational NCL, no reset.
// Loops: gate state holding as in th_gate; the combinational loops tools report are intended.
module ncl_gens7
  import ncl_pkg::*;
(
  input  dr_t c,
  input  dr_t x,
  input  dr_t y,
  input  dr_t z,
  output dr_t s
);

  dr_t m;

  th_gate #(.N(3), .M(2)) u_m1 (.a({z.r1, y.r1, x.r1}), .rst(1'b0), .z(m.r1));
  th_gate #(.N(3), .M(2)) u_m0 (.a({z.r0, y.r0, x.r0}), .rst(1'b0), .z(m.r0));
  th_gate #(.N(4), .FN(FN_TH24COMP)) u_s1 (.a({m.r1, c.r1, m.r0, c.r0}), .rst(1'b0), .z(s.r1));
  th_gate #(.N(4), .FN(FN_TH24COMP)) u_s0 (.a({m.r0, c.r1, m.r1, c.r0}), .rst(1'b0), .z(s.r0));

endmodule
