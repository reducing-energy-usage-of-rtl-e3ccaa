// ncl_pkg - shared types and helpers for the dual-rail NULL Convention Logic (NCL) design.
//
// A dual-rail signal carries one bit on two wires: r0 high means DATA0 (logic 0), r1 high means
// DATA1 (logic 1), both low means NULL (no data yet) and both high is illegal. Data and NULL
// wavefronts alternate; handshake wires (ki/ko) are single-rail, where 1 is "request for data"
// (rfd) and 0 is "request for NULL" (rfn).
//
// gate_fn_e selects the set function of the threshold gate primitive (th_gate): a weighted
// threshold THmn, or the two non-threshold library functions THand0 (AB+BC+AD) and TH24comp
// (AC+BC+AD+BD). rst_mode_e selects the reset flavour of a gate: none, N (reset to 0) or D
// (reset to 1), as the gate naming convention of NCL does.
package ncl_pkg;

  typedef struct packed {
    logic r1;
    logic r0;
  } dr_t;

  typedef enum logic [1:0] {
    FN_THRESH  = 2'd0,
    FN_AND0    = 2'd1,
    FN_TH24COMP = 2'd2
  } gate_fn_e;

  typedef enum logic [1:0] {
    RST_NONE = 2'd0,
    RST_N    = 2'd1,
    RST_D    = 2'd2
  } rst_mode_e;

  // Encode a Boolean bit as a DATA wavefront.
  function automatic dr_t dr_data(input logic b);
    return b ? '{r1: 1'b1, r0: 1'b0} : '{r1: 1'b0, r0: 1'b1};
  endfunction

  // True when the dual-rail bit holds DATA0 or DATA1.
  function automatic logic dr_is_data(input dr_t v);
    return v.r1 ^ v.r0;
  endfunction

  function automatic logic dr_is_null(input dr_t v);
    return !(v.r1 || v.r0);
  endfunction

endpackage
