// ncl_completion - full-word completion detector (a WIDTH-input C-element built as a tree).
//
// The output rises when every input is 1 and falls when every input is 0; in between it holds.
// Used to conjoin the per-bit acknowledges of a register or of the demultiplexer into a single
// request, so that the next wavefront is requested only once the whole word has switched. The
// first level groups the inputs by four into TH44 (or smaller THnn) gates, the second level joins
// the group outputs in one THgg gate, so WIDTH up to 16 gives at most two gate levels. The tree
// shape is this design's choice; the document gives the function (full-word completion) only.
// Interface: a (per-bit acknowledges), z (conjoined acknowledge). Asynchronous, no reset: the
// output follows its inputs, which are themselves reset.
// Loops: the C-elements hold state through their own feedback (see th_gate); the combinational
// loops that tools report for this module are that intended state holding.
module ncl_completion #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  output logic             z
);

  localparam int unsigned GROUPS = (WIDTH + 3) / 4;

  logic [GROUPS-1:0] grp;

  for (genvar g = 0; g < GROUPS; g++) begin : g_grp
    localparam int unsigned LO = g * 4;
    localparam int unsigned SZ = (WIDTH - LO >= 4) ? 4 : WIDTH - LO;
    th_gate #(.N(SZ), .M(SZ)) u_c (.a(a[LO +: SZ]), .rst(1'b0), .z(grp[g]));
  end

  if (GROUPS == 1) begin : g_one
    assign z = grp[0];
  end else begin : g_two
    th_gate #(.N(GROUPS), .M(GROUPS)) u_c (.a(grp), .rst(1'b0), .z(z));
  end

endmodule
