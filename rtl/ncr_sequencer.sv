// ncr_sequencer - four-phase select generator of the NULL Cycle Reduction architecture.
//
// A ring of four 3-input C-elements (TH33) d0..d3; gate k takes ki, the previous gate's output and
// the inverted output of the next gate. Reset puts the ring in d = {d0,d1,d2,d3} = 0,1,0,0 (gate
// d1 resets to 1, the others to 0). Each transition of ki then moves the ring one step, so over the
// four phases of two DATA/NULL cycles (ki = 1,0,1,0) the outputs are
//   s1 = d2 : 1 0 0 0   (selects side 1 for the first DATA cycle)
//   s2 = d0 : 0 0 1 0   (selects side 2 for the second DATA cycle)
// and both are 0 during NULL phases. The ring structure, reset values and output taps follow the
// design's sequence generator.
// Interface: ki (the request that steps the ring), rst (active high), s1/s2 (selects).
// Timing: asynchronous; s1/s2 settle after each ki transition.
// Loops: the ring itself is a closed asynchronous loop and each C-element holds state through
// its own feedback (see th_gate); the combinational loops tools report here are intended.
module ncr_sequencer
  import ncl_pkg::*;
(
  input  logic ki,
  input  logic rst,
  output logic s1,
  output logic s2
);

  logic [3:0] d;

  th_gate #(.N(3), .M(3), .RST_MODE(RST_N)) u_g0 (.a({ki, d[3], ~d[1]}), .rst(rst), .z(d[0]));
  th_gate #(.N(3), .M(3), .RST_MODE(RST_D)) u_g1 (.a({ki, d[0], ~d[2]}), .rst(rst), .z(d[1]));
  th_gate #(.N(3), .M(3), .RST_MODE(RST_N)) u_g2 (.a({ki, d[1], ~d[3]}), .rst(rst), .z(d[2]));
  th_gate #(.N(3), .M(3), .RST_MODE(RST_N)) u_g3 (.a({ki, d[2], ~d[0]}), .rst(rst), .z(d[3]));

  assign s1 = d[2];
  assign s2 = d[0];

endmodule
