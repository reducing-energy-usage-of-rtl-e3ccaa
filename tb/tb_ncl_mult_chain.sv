// tb_ncl_mult_chain - self-checking test of the two- and four-multiplier chains.
//
// Two chains (N_MULT = 2 and 4) run 300 operations each (all 256 operand pairs first) with random
// handshake delays. Each result must equal the nibble product applied N_MULT times; a deeper chain
// holds several operations at once, which is checked too.
module tb_ncl_mult_chain;
  import ncl_pkg::*;
  logic rst2, ki2, ko2, done2, rst4, ki4, ko4, done4;
  dr_t [3:0] x2, y2, x4, y4;
  dr_t [7:0] s2, s4;
  int c2, f2, o2, m2, w2, h2, c4, f4, o4, m4, w4, h4;

  ncl_mult_chain #(.N_MULT(2)) dut2 (.x(x2), .y(y2), .ki(ki2), .rst(rst2), .s(s2), .ko(ko2));
  ncl_mult_chain #(.N_MULT(4)) dut4 (.x(x4), .y(y4), .ki(ki4), .rst(rst4), .s(s4), .ko(ko4));

  ncl_mult_env #(.N_MULT(2), .N_OPS(300)) env2 (
    .rst(rst2), .x(x2), .y(y2), .ki(ki2), .s(s2), .ko(ko2), .checks(c2), .failures(f2),
    .done_ops(o2), .max_inflight(m2), .in_waits(w2), .out_holds(h2), .done(done2)
  );
  ncl_mult_env #(.N_MULT(4), .N_OPS(300)) env4 (
    .rst(rst4), .x(x4), .y(y4), .ki(ki4), .s(s4), .ko(ko4), .checks(c4), .failures(f4),
    .done_ops(o4), .max_inflight(m4), .in_waits(w4), .out_holds(h4), .done(done4)
  );

  initial begin
    #400000;
    $display("FAIL watchdog: %0d / %0d operations done", o2, o4);
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c4, f2 + f4 + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    #10;  // the environment clears done at time 0
    wait (done2 === 1'b1 && done4 === 1'b1);
    #1;
    checks = c2 + c4 + 2;
    failures = f2 + f4;
    $display("N=2: ops=%0d max_inflight=%0d; N=4: ops=%0d max_inflight=%0d", o2, m2, o4, m4);
    // A chain of N multipliers has 2N registers and so can hold more than one operation.
    if (m2 < 2) begin failures++; $display("FAIL two-multiplier chain never held 2 operations"); end
    if (m4 < 3) begin failures++; $display("FAIL four-multiplier chain never held 3 operations"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
