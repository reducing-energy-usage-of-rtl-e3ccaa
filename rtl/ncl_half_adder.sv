// ncl_half_adder - dual-rail NCL half adder (input-complete).
//
// Carry: co.r1 = TH22(x1, y1), co.r0 = THand0(x0, y0, x1, y1) = x0 y0 + x0 y1 + x1 y0.
// Sum:   s.r1  = TH24comp(x0, y0, x1, y1) = x0 y1 + x1 y0,
//        s.r0  = TH24comp(x0, y1, x1, y0) = x0 y0 + x1 y1.
// Every output rail waits for both inputs and holds until all its inputs are NULL. The gate
// equations are this design's choice of the standard NCL half adder; the document uses the cell by
// name. Combinational NCL, no reset.
// Loops: gate state holding as in th_gate; the combinational loops tools report are intended.
module ncl_half_adder
  import ncl_pkg::*;
(
  input  dr_t x,
  input  dr_t y,
  output dr_t co,
  output dr_t s
);

  th_gate #(.N(2), .M(2))          u_c1 (.a({y.r1, x.r1}),             .rst(1'b0), .z(co.r1));
  th_gate #(.N(4), .FN(FN_AND0))   u_c0 (.a({y.r1, x.r1, y.r0, x.r0}), .rst(1'b0), .z(co.r0));
  th_gate #(.N(4), .FN(FN_TH24COMP)) u_s1 (.a({y.r1, x.r1, y.r0, x.r0}), .rst(1'b0), .z(s.r1));
  th_gate #(.N(4), .FN(FN_TH24COMP)) u_s0 (.a({y.r0, x.r1, y.r1, x.r0}), .rst(1'b0), .z(s.r0));

endmodule
