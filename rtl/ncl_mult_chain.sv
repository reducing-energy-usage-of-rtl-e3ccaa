// ncl_mult_chain - N_MULT 4x4 multipliers in series, the duplicated circuit of the design.
//
// Stage k multiplies the two nibbles of stage k-1's 8-bit product: product bits [7:4] become its
// x and bits [3:0] its y. Stage k's request is stage k+1's ko, so the chain forms one NCL pipeline
// with 2*N_MULT registration stages. With N_MULT = 1 this is the single multiplier; 2 and 4 are the
// larger circuits used to show how the energy saving grows with the size of the duplicated logic.
// The result is s = f^N_MULT(x, y) where f(p) = p[7:4] * p[3:0] and the first p is {x, y}.
// Interface and timing as ncl_mult4x4.
// Loops: the handshake loops of the multipliers and between neighbouring stages are intended
// asynchronous feedback, reported by tools as combinational loops.
module ncl_mult_chain
  import ncl_pkg::*;
#(
  parameter int unsigned N_MULT = 1
) (
  input  dr_t [3:0] x,
  input  dr_t [3:0] y,
  input  logic      ki,
  input  logic      rst,
  output dr_t [7:0] s,
  output logic      ko
);

  dr_t  [7:0] p  [N_MULT+1];   // p[k] = operands of stage k; p[N_MULT] = chain output
  logic       k  [N_MULT+1];   // k[k] = ko of stage k; k[N_MULT] = external request

  assign p[0]      = {x, y};
  assign k[N_MULT] = ki;

  for (genvar g = 0; g < N_MULT; g++) begin : g_stage
    ncl_mult4x4 u_mult (
      .x(p[g][7:4]), .y(p[g][3:0]), .ki(k[g+1]), .rst(rst), .s(p[g+1]), .ko(k[g])
    );
  end

  assign s  = p[N_MULT];
  assign ko = k[0];

endmodule
