// ncl_full_adder - dual-rail NCL full adder (input-complete).
//
// Carry: co.rK = TH23(xK, yK, ciK) for each rail K (majority of the three inputs' rails).
// Sum:   s.r1 = TH34w2(co.r0, x1, y1, ci1), s.r0 = TH34w2(co.r1, x0, y0, ci0), the carry rail
// weighing 2. For example s.r1 rises when exactly one input is 1 (co.r0 plus one 1) or when all
// three are 1. Every output waits for all three inputs and holds until they are all NULL. The gate
// equations are this design's choice of the standard NCL full adder; the document uses the cell by
// name. Combinational NCL, no reset.
// Loops: gate state holding as in th_gate; the combinational loops tools report are intended.
module ncl_full_adder
  import ncl_pkg::*;
(
  input  dr_t ci,
  input  dr_t x,
  input  dr_t y,
  output dr_t co,
  output dr_t s
);

  th_gate #(.N(3), .M(2)) u_c1 (.a({ci.r1, y.r1, x.r1}), .rst(1'b0), .z(co.r1));
  th_gate #(.N(3), .M(2)) u_c0 (.a({ci.r0, y.r0, x.r0}), .rst(1'b0), .z(co.r0));
  th_gate #(.N(4), .M(3), .W0(2)) u_s1 (.a({ci.r1, y.r1, x.r1, co.r0}), .rst(1'b0), .z(s.r1));
  th_gate #(.N(4), .M(3), .W0(2)) u_s0 (.a({ci.r0, y.r0, x.r0, co.r1}), .rst(1'b0), .z(s.r0));

endmodule
