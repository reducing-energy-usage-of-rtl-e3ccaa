// ncl_and2 - dual-rail NCL AND of two bits.
//
// z.r1 = TH22(a.r1, b.r1). For z.r0 two forms exist and COMPLETE selects between them:
//  - COMPLETE = 1: z.r0 = THand0(a.r0, b.r0, a.r1, b.r1) = a0 b0 + a0 b1 + a1 b0, so z goes DATA
//    only when both inputs are DATA (input-complete);
//  - COMPLETE = 0: z.r0 = TH12(a.r0, b.r0), which asserts as soon as either input is DATA0. This
//    input-incomplete form is cheaper; it is safe in the multiplier because every input bit also
//    feeds an input-complete AND there, so the circuit as a whole still observes every input.
// Both forms hold their output until all their inputs are NULL. The design distinguishes a
// complete and an incomplete AND cell by name only; these gate equations are this design's choice.
// Combinational NCL (state-holding gates, no reset).
// Loops: gate state holding as in th_gate; the combinational loops tools report are intended.
module ncl_and2
  import ncl_pkg::*;
#(
  parameter bit COMPLETE = 1'b1
) (
  input  dr_t a,
  input  dr_t b,
  output dr_t z
);

  th_gate #(.N(2), .M(2)) u_r1 (.a({b.r1, a.r1}), .rst(1'b0), .z(z.r1));

  if (COMPLETE) begin : g_complete
    th_gate #(.N(4), .FN(FN_AND0)) u_r0 (.a({b.r1, a.r1, b.r0, a.r0}), .rst(1'b0), .z(z.r0));
  end else begin : g_incomplete
    th_gate #(.N(2), .M(1)) u_r0 (.a({b.r0, a.r0}), .rst(1'b0), .z(z.r0));
  end

endmodule
