// ncr_mux - the NULL Cycle Reduction multiplexer, WIDTH dual-rail bits wide.
//
// Each output rail is a TH12 gate (2-input OR) of the same rail of inputs A and B. Because the
// output sequencer lets only one of the two circuits hold DATA at a time, the output shows the DATA
// of whichever side has it and NULL when both sides are NULL. Purely combinational; this structure
// follows the design's multiplexer.
// Interface: a1 (input A, from Circuit #1), a2 (input B, from Circuit #2), z (output D).
// Loops: the TH12 gates are modelled with the common hysteresis feedback of th_gate (for a TH1n
// gate it never changes the output); the loops tools report here come from that.
module ncr_mux
  import ncl_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  dr_t [WIDTH-1:0] a1,
  input  dr_t [WIDTH-1:0] a2,
  output dr_t [WIDTH-1:0] z
);

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    th_gate #(.N(2), .M(1)) u_r1 (.a({a1[i].r1, a2[i].r1}), .rst(1'b0), .z(z[i].r1));
    th_gate #(.N(2), .M(1)) u_r0 (.a({a1[i].r0, a2[i].r0}), .rst(1'b0), .z(z[i].r0));

    // The output sequencer must never let both circuits present DATA on the same bit at once.
    always_comb begin
      assert (!((a1[i].r1 || a1[i].r0) && (a2[i].r1 || a2[i].r0)))
        else $error("ncr_mux: both inputs hold DATA on bit %0d", i);
    end
  end

endmodule
