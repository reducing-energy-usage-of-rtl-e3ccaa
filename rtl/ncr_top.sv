// ncr_top - NULL Cycle Reduction (NCR) around a dual-rail NCL multiplier circuit.
//
// An NCL circuit spends every other half-cycle propagating a NULL wavefront. NCR hides that time
// by duplicating the circuit: a demultiplexer sends the first DATA/NULL cycle of the input to
// Circuit #1, the second to Circuit #2, and so on alternately, and a multiplexer joins their
// outputs again. While one copy is resetting to NULL the other is already computing, so the
// input and output each see a faster DATA-to-DATA cycle; or, at equal throughput, each copy may run
// slower (for instance at a reduced supply voltage) to save energy.
//
// Parts (all asynchronous, four-phase, 1 = rfd / 0 = rfn):
//   demultiplexer   u_demux : input D -> A (Circuit #1) or B (Circuit #2)
//   completion      u_comp  : conjoins the demux's per-bit NULL detect into ko (to the sender)
//   sequencer #1    u_seq_in: stepped by ko; its selects s1/s2 alternate A and B
//   circuit #1/#2   u_c1/u_c2: identical ncl_mult_chain #(N_MULT)
//   sequencer #2    u_seq_out: stepped by the external ki; its selects are the circuits' requests,
//                   so the results leave in the order the operands came in
//   multiplexer     u_mux   : joins the two circuit outputs into s
// The connections follow the NCR architecture as the design describes it. The four parts
// (demux+sequencer #1+completion, the circuits, the mux, sequencer #2) are separate instances so
// that each may sit in its own supply domain.
// Interface: x, y (dual-rail operands, together the 8-bit input D), ki (request from the receiver),
// rst (active high; afterwards all outputs are NULL and ko = 1), s (dual-rail result), ko.
// Loops: the request/acknowledge paths through the sequencers, demultiplexer and circuits are
// intended asynchronous feedback, reported by tools as combinational loops.
module ncr_top
  import ncl_pkg::*;
#(
  parameter int unsigned N_MULT = 1
) (
  input  logic      rst,
  input  dr_t [3:0] x,
  input  dr_t [3:0] y,
  input  logic      ki,
  output dr_t [7:0] s,
  output logic      ko
);

  dr_t  [7:0] di1, di2, do1, do2;
  logic [7:0] kod;
  logic       sel1, sel2;     // Sequencer #1 selects
  logic       ko1, ko2;       // circuits' requests to the demultiplexer
  logic       ki1, ki2;       // Sequencer #2 outputs, the circuits' requests

  ncr_demux #(.WIDTH(8)) u_demux (
    .a({x, y}), .rst(rst), .ki1(ko1), .ki2(ko2), .s1(sel1), .s2(sel2),
    .z1(di1), .z2(di2), .ko(kod)
  );

  ncl_completion #(.WIDTH(8)) u_comp (.a(kod), .z(ko));

  ncr_sequencer u_seq_in (.ki(ko), .rst(rst), .s1(sel1), .s2(sel2));

  ncl_mult_chain #(.N_MULT(N_MULT)) u_c1 (
    .x(di1[7:4]), .y(di1[3:0]), .ki(ki1), .rst(rst), .s(do1), .ko(ko1)
  );
  ncl_mult_chain #(.N_MULT(N_MULT)) u_c2 (
    .x(di2[7:4]), .y(di2[3:0]), .ki(ki2), .rst(rst), .s(do2), .ko(ko2)
  );

  ncr_mux #(.WIDTH(8)) u_mux (.a1(do1), .a2(do2), .z(s));

  ncr_sequencer u_seq_out (.ki(ki), .rst(rst), .s1(ki1), .s2(ki2));

endmodule
