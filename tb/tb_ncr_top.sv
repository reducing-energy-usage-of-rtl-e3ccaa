// tb_ncr_top - end-to-end test of the NULL Cycle Reduction multiplier at its default size.
//
// The sender/receiver environment pushes all 256 operand pairs and then random ones through the
// NCR design with random handshake delays and checks every product, in order. Probes on the two
// circuit inputs and outputs check the NCR mechanisms and count how often each happened:
//  - alternation: DATA wavefronts must enter Circuit #1 and Circuit #2 strictly in turn, and the
//    results must leave in the same turn;
//  - overlap: at some point two operations must be in flight at once (one in each circuit), which
//    is what NCR is for;
//  - input stall: the sender must at some point find both circuits busy (ko = 0 when it is ready);
//  - output back-pressure: the receiver must at some point hold a result while new input arrives.
// A mechanism that never happened counts as a failure.
module tb_ncr_top;
  import ncl_pkg::*;
  logic rst, ki, ko, done;
  dr_t [3:0] x, y;
  dr_t [7:0] s;
  int checks, failures, done_ops, max_inflight, in_waits, out_holds;

  ncr_top dut (.rst(rst), .x(x), .y(y), .ki(ki), .s(s), .ko(ko));

  ncl_mult_env #(.N_MULT(1), .N_OPS(600)) env (
    .rst(rst), .x(x), .y(y), .ki(ki), .s(s), .ko(ko), .checks(checks), .failures(failures),
    .done_ops(done_ops), .max_inflight(max_inflight), .in_waits(in_waits),
    .out_holds(out_holds), .done(done)
  );

  function automatic logic all_data(dr_t [7:0] v);
    for (int i = 0; i < 8; i++) if (!dr_is_data(v[i])) return 1'b0;
    return 1'b1;
  endfunction

  // Mechanism probes.
  int n_in1 = 0, n_in2 = 0, n_out1 = 0, n_out2 = 0, alt_err = 0;
  logic last_in = 1'b1, last_out = 1'b1;   // side of the previous wavefront (1 = circuit #2)
  logic in1_d = 0, in2_d = 0, out1_d = 0, out2_d = 0;

  always @(dut.di1 or dut.di2 or dut.do1 or dut.do2) begin
    if (all_data(dut.di1) && !in1_d) begin
      n_in1++;
      if (last_in != 1'b1) alt_err++;
      last_in = 1'b0;
    end
    if (all_data(dut.di2) && !in2_d) begin
      n_in2++;
      if (last_in != 1'b0) alt_err++;
      last_in = 1'b1;
    end
    if (all_data(dut.do1) && !out1_d) begin
      n_out1++;
      if (last_out != 1'b1) alt_err++;
      last_out = 1'b0;
    end
    if (all_data(dut.do2) && !out2_d) begin
      n_out2++;
      if (last_out != 1'b0) alt_err++;
      last_out = 1'b1;
    end
    in1_d = all_data(dut.di1);
    in2_d = all_data(dut.di2);
    out1_d = all_data(dut.do1);
    out2_d = all_data(dut.do2);
  end

  initial begin
    #400000;
    $display("FAIL watchdog: %0d operations done", done_ops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic mech(string name, int count, int need, inout int c, inout int f);
    c++;
    $display("  %-32s %0d", name, count);
    if (count < need) begin
      f++;
      $display("FAIL mechanism '%s' happened %0d times, needed %0d", name, count, need);
    end
  endtask

  initial begin
    int c, f;
    #10;  // the environment clears done at time 0
    wait (done === 1'b1);
    #1;
    c = checks;
    f = failures;
    $display("ops=%0d", done_ops);
    mech("DATA into circuit #1", n_in1, 1, c, f);
    mech("DATA into circuit #2", n_in2, 1, c, f);
    mech("results from circuit #1", n_out1, 1, c, f);
    mech("results from circuit #2", n_out2, 1, c, f);
    mech("two operations in flight", max_inflight >= 2 ? 1 : 0, 1, c, f);
    mech("sender stalled, both busy", in_waits, 1, c, f);
    mech("receiver back-pressure", out_holds, 1, c, f);
    c++;
    if (alt_err != 0 || n_in1 + n_in2 != done_ops || n_out1 + n_out2 != done_ops) begin
      f++;
      $display("FAIL alternation: errors=%0d in=%0d+%0d out=%0d+%0d ops=%0d", alt_err, n_in1,
               n_in2, n_out1, n_out2, done_ops);
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
