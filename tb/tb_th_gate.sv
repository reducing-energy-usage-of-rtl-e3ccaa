// tb_th_gate - self-checking test of the NCL threshold gate primitive.
//
// Drives random input sequences into six gate variants (TH23, TH34w2, THand0, TH24comp, TH33 with
// N reset, TH22 with D reset) and compares each output, after every change, with a reference
// model that recomputes the set function from a truth table and applies hysteresis itself.
module tb_th_gate;
  import ncl_pkg::*;

  int checks = 0, failures = 0;
  logic rst;
  logic [3:0] a4;
  logic [2:0] a3;
  logic [1:0] a2;
  logic z23, z34w2, zand0, zcomp, z33n, z22d;

  th_gate #(.N(3), .M(2))                         u23   (.a(a3), .rst(rst), .z(z23));
  th_gate #(.N(4), .M(3), .W0(2))                 u34w2 (.a(a4), .rst(rst), .z(z34w2));
  th_gate #(.N(4), .FN(FN_AND0))                  uand0 (.a(a4), .rst(rst), .z(zand0));
  th_gate #(.N(4), .FN(FN_TH24COMP))              ucomp (.a(a4), .rst(rst), .z(zcomp));
  th_gate #(.N(3), .M(3), .RST_MODE(RST_N))       u33n  (.a(a3), .rst(rst), .z(z33n));
  th_gate #(.N(2), .M(2), .RST_MODE(RST_D))       u22d  (.a(a2), .rst(rst), .z(z22d));

  // Reference state.
  logic r23, r34w2, rand0, rcomp, r33n, r22d;

  function automatic logic hyst(logic prev, logic set, logic low);
    return set ? 1'b1 : (low ? 1'b0 : prev);
  endfunction

  task automatic check(string name, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a4=%b a3=%b a2=%b got %b exp %b", name, a4, a3, a2, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a4 = '0; a3 = '0; a2 = '0;
    rst = 1'b1;
    #1;
    r23 = z23; r34w2 = z34w2; rand0 = zand0; rcomp = zcomp;  // no-reset gates: inputs low -> 0
    check("reset th33n", z33n, 1'b0);
    check("reset th22d", z22d, 1'b1);
    check("low th23", z23, 1'b0);
    check("low th34w2", z34w2, 1'b0);
    r33n = 1'b0; r22d = 1'b1; r23 = 1'b0; r34w2 = 1'b0; rand0 = 1'b0; rcomp = 1'b0;
    rst = 1'b0;
    #1;
    for (int it = 0; it < 4000; it++) begin
      // Change one input bit at a time, as a wavefront does.
      int unsigned pick;
      pick = $urandom_range(2);
      case (pick)
        0: a4[$urandom_range(3)] ^= 1'b1;
        1: a3[$urandom_range(2)] ^= 1'b1;
        default: a2[$urandom_range(1)] ^= 1'b1;
      endcase
      #1;
      r23   = hyst(r23,   (32'(a3[0]) + a3[1] + a3[2]) >= 2, a3 == 0);
      r33n  = hyst(r33n,  a3 == 3'b111, a3 == 0);
      r22d  = hyst(r22d,  a2 == 2'b11,  a2 == 0);
      r34w2 = hyst(r34w2, (2 * 32'(a4[0]) + a4[1] + a4[2] + a4[3]) >= 3, a4 == 0);
      rand0 = hyst(rand0, (a4[0] & a4[1]) | (a4[1] & a4[2]) | (a4[0] & a4[3]), a4 == 0);
      rcomp = hyst(rcomp, (a4[0] & a4[2]) | (a4[1] & a4[2]) | (a4[0] & a4[3]) | (a4[1] & a4[3]),
                   a4 == 0);
      check("th23", z23, r23);
      check("th33n", z33n, r33n);
      check("th22d", z22d, r22d);
      check("th34w2", z34w2, r34w2);
      check("thand0", zand0, rand0);
      check("th24comp", zcomp, rcomp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
