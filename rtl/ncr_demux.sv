// ncr_demux - the NULL Cycle Reduction demultiplexer, WIDTH dual-rail bits wide.
//
// Every rail of output A is a 3-input C-element (TH33 with reset to 0) of the input rail, the
// select s1 and Circuit #1's request ki1; output B likewise uses s2 and ki2. A DATA wavefront thus
// reaches A only while Sequencer #1 selects A and Circuit #1 asks for DATA; it is held on A until
// the input, s1 and ki1 have all dropped, which lets A's NULL wavefront through. Per bit, ko is the
// NOR of all four output rails (TH14 with inverted output): 1 when both outputs are NULL. The
// parent conjoins ko into the stage's completion signal. This gate structure follows the design's
// demultiplexer cell; the single vector module (instead of a cell plus a generate wrapper) is a
// packaging choice.
// Interface: a (input D), s1/s2 (selects from Sequencer #1), ki1/ki2 (requests of the two
// circuits), z1/z2 (outputs A and B), ko (per-bit NULL detect), rst (outputs to NULL).
// Loops: the C-elements hold state through their own feedback (see th_gate); the combinational
// loops that tools report for this module are that intended state holding.
module ncr_demux
  import ncl_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  dr_t  [WIDTH-1:0] a,
  input  logic             rst,
  input  logic             ki1,
  input  logic             ki2,
  input  logic             s1,
  input  logic             s2,
  output dr_t  [WIDTH-1:0] z1,
  output dr_t  [WIDTH-1:0] z2,
  output logic [WIDTH-1:0] ko
);

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    th_gate #(.N(3), .M(3), .RST_MODE(RST_N)) u_a1 (.a({a[i].r1, s1, ki1}), .rst(rst), .z(z1[i].r1));
    th_gate #(.N(3), .M(3), .RST_MODE(RST_N)) u_a0 (.a({a[i].r0, s1, ki1}), .rst(rst), .z(z1[i].r0));
    th_gate #(.N(3), .M(3), .RST_MODE(RST_N)) u_b1 (.a({a[i].r1, s2, ki2}), .rst(rst), .z(z2[i].r1));
    th_gate #(.N(3), .M(3), .RST_MODE(RST_N)) u_b0 (.a({a[i].r0, s2, ki2}), .rst(rst), .z(z2[i].r0));
    assign ko[i] = ~(z1[i].r1 | z1[i].r0 | z2[i].r1 | z2[i].r0);
  end

endmodule
