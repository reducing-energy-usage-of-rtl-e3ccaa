// ncl_register - one dual-rail NCL registration stage of WIDTH bits.
//
// Each rail of each bit is a TH22 gate (a 2-input C-element) of the incoming rail and the bit's
// request ki: with ki = 1 (rfd) a DATA wavefront is passed and then held, with ki = 0 (rfn) a
// NULL wavefront is passed and then held. The bit's acknowledge ko is the NOR of its two output
// rails (a TH12 gate with inverted output): 1 while the bit holds NULL, asking for DATA, and 0 while
// it holds DATA, asking for NULL. Requests and acknowledges are per bit so that a parent can
// conjoin them (ncl_completion) for full-word completion.
//
// Reset: with INIT_NULL = 1 (default) the rails reset to NULL, so ko = 1 (rfd) after reset, as the
// circuits of the design are specified to start. INIT_NULL = 0 resets every bit to DATA0 instead,
// the other initial value an NCL register can have. The per-rail TH22 structure is the standard NCL
// register and is this design's choice; the document gives the register's role and ports.
// Timing: asynchronous, delay-insensitive four-phase handshake.
// Loops: each rail gate holds its state through its own feedback (see th_gate); the combinational
// loops that tools report for this module are that intended state holding.
module ncl_register
  import ncl_pkg::*;
#(
  parameter int unsigned WIDTH     = 8,
  parameter bit          INIT_NULL = 1'b1
) (
  input  dr_t  [WIDTH-1:0] d,
  input  logic [WIDTH-1:0] ki,
  input  logic             rst,
  output dr_t  [WIDTH-1:0] q,
  output logic [WIDTH-1:0] ko
);

  localparam rst_mode_e R0_RST = INIT_NULL ? RST_N : RST_D;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    th_gate #(.N(2), .M(2), .RST_MODE(RST_N)) u_r1 (
      .a({d[i].r1, ki[i]}), .rst(rst), .z(q[i].r1)
    );
    th_gate #(.N(2), .M(2), .RST_MODE(R0_RST)) u_r0 (
      .a({d[i].r0, ki[i]}), .rst(rst), .z(q[i].r0)
    );
    assign ko[i] = ~(q[i].r1 | q[i].r0);

    // A register bit never holds both rails high (it would need an illegal input word).
    always_comb begin
      if (!rst) assert (!(q[i].r1 && q[i].r0))
        else $error("ncl_register: bit %0d holds both rails", i);
    end
  end

endmodule
