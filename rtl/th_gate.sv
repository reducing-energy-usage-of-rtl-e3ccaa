// th_gate - NCL threshold gate with hysteresis, the primitive every other module is built from.
//
// A THmn gate has N inputs; its output rises once its set function is true and, because of
// hysteresis, falls only when every input has returned to 0. With FN_THRESH the set function is
// "weighted count of high inputs >= M", input a[0] weighing W0 and the others 1 (W0 = 2 gives the
// THmnw2 gates). FN_AND0 and FN_TH24COMP are the 4-input library gates THand0 (AB+BC+AD) and
// TH24comp (AC+BC+AD+BD), with A = a[0], B = a[1], C = a[2], D = a[3]. The threshold, the
// hysteresis and the N/D reset flavours follow the gate description the design is based on; the
// weight parameter and the two non-threshold functions are the standard NCL cell set.
//
// Interface: a (inputs), rst (active high, used only when RST_MODE is not RST_NONE), z (output).
// Timing: asynchronous, no clock. The state is held by feeding the output back into its own
// equation, z = set | (z & ~all_low), the usual gate-level model of a hysteresis gate; this loop,
// and the loops that handshakes close through these gates, are the intended NCL state-holding
// behaviour, so the combinational-loop warnings that tools give for them stand.
module th_gate
  import ncl_pkg::*;
#(
  parameter int unsigned N        = 2,
  parameter int unsigned M        = 2,
  parameter int unsigned W0       = 1,
  parameter gate_fn_e    FN       = FN_THRESH,
  parameter rst_mode_e   RST_MODE = RST_NONE
) (
  input  logic [N-1:0] a,
  input  logic         rst,
  output logic         z
);

  if (FN != FN_THRESH && N != 4) begin : g_bad_fn
    $error("th_gate: THand0 and TH24comp gates have exactly four inputs");
  end

  // Width of the weighted input count: enough for N - 1 + W0.
  localparam int unsigned SW = $clog2(N + W0) + 1;

  logic set_fn;
  logic all_low;

  always_comb begin
    logic [SW-1:0] sum;
    logic [3:0]  q;   // first four inputs, zero-padded, for the 4-input functions
    q   = '0;
    sum = 0;
    for (int unsigned i = 0; i < N && i < 4; i++) q[i] = a[i];
    for (int unsigned i = 0; i < N; i++) begin
      if (a[i]) sum += (i == 0) ? SW'(W0) : SW'(1);
    end
    unique case (FN)
      FN_AND0:     set_fn = (q[0] && q[1]) || (q[1] && q[2]) || (q[0] && q[3]);
      FN_TH24COMP: set_fn = (q[0] || q[1]) && (q[2] || q[3]);
      default:     set_fn = (32'(sum) >= M);
    endcase
    all_low = (a == '0);
  end

  // Hysteresis: the output feeds back into its own next value (a set/hold/reset loop).
  assign z = (RST_MODE != RST_NONE && rst) ? (RST_MODE == RST_D) : (set_fn || (z && !all_low));

endmodule
