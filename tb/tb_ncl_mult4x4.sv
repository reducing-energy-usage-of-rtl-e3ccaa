// tb_ncl_mult4x4 - self-checking test of the 4x4 dual-rail NCL multiplier.
//
// Runs all 256 operand pairs, then 256 random ones, through the four-phase handshake with random
// sender and receiver delays, and checks every product against x*y computed in the testbench,
// that results come out in order, that no output bit becomes illegal, and that ko = 1 after reset.
module tb_ncl_mult4x4;
  import ncl_pkg::*;
  logic rst, ki, ko, done;
  dr_t [3:0] x, y;
  dr_t [7:0] s;
  int checks, failures, done_ops, max_inflight, in_waits, out_holds;

  ncl_mult4x4 dut (.x(x), .y(y), .ki(ki), .rst(rst), .s(s), .ko(ko));

  ncl_mult_env #(.N_MULT(1), .N_OPS(512)) env (
    .rst(rst), .x(x), .y(y), .ki(ki), .s(s), .ko(ko), .checks(checks), .failures(failures),
    .done_ops(done_ops), .max_inflight(max_inflight), .in_waits(in_waits),
    .out_holds(out_holds), .done(done)
  );

  initial begin
    #200000;
    $display("FAIL watchdog: %0d operations done", done_ops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #10;  // the environment clears done at time 0
    wait (done === 1'b1);
    #1;
    $display("ops=%0d max_inflight=%0d in_waits=%0d out_holds=%0d", done_ops, max_inflight,
             in_waits, out_holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
