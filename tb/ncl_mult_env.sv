// ncl_mult_env - reusable sender/receiver environment for the dual-rail multiplier circuits.
//
// The sender waits for ko = 1 (rfd), waits a random 0..MAX_DELAY time units, presents the next
// operand pair {x, y} as a DATA wavefront, waits for ko = 0 (rfn), waits again and presents NULL.
// With EXHAUSTIVE = 1 the first 256 operations cover every operand pair in order, after that (or
// always, with EXHAUSTIVE = 0) operands are random. The receiver holds ki = 1 until s is a
// complete DATA word, compares it with the expected result of the next outstanding operation,
// waits a random time (sometimes long, to back-pressure the circuit), drops ki, waits for s to be
// all NULL, waits again and raises ki. The expected result of N_MULT chained multipliers is
// f applied N_MULT times to {x, y}, f(p) = p[7:4] * p[3:0].
// Counters: checks/failures, operations completed, the largest number of operations in flight
// (accepted by the sender side, not yet delivered), how often a presented word had to wait
// because the circuit was busy
// and how often the receiver held the circuit back.
module ncl_mult_env
  import ncl_pkg::*;
#(
  parameter int unsigned N_MULT      = 1,
  parameter int unsigned N_OPS       = 256,
  parameter bit          EXHAUSTIVE  = 1'b1,
  parameter int unsigned MAX_DELAY   = 4
) (
  output logic      rst,
  output dr_t [3:0] x,
  output dr_t [3:0] y,
  output logic      ki,
  input  dr_t [7:0] s,
  input  logic      ko,
  output int        checks,
  output int        failures,
  output int        done_ops,
  output int        max_inflight,
  output int        in_waits,
  output int        out_holds,
  output logic      done
);

  logic [7:0] expq[$];
  int         sent;

  function automatic logic [7:0] model(logic [7:0] p);
    for (int k = 0; k < int'(N_MULT); k++) p = p[7:4] * p[3:0];
    return p;
  endfunction

  function automatic logic all_data(dr_t [7:0] v);
    for (int i = 0; i < 8; i++) if (!dr_is_data(v[i])) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic [7:0] decode(dr_t [7:0] v);
    logic [7:0] r;
    for (int i = 0; i < 8; i++) r[i] = v[i].r1;
    return r;
  endfunction

  task automatic pause(int unsigned maxd);
    int unsigned d;
    d = $urandom_range(maxd);
    if (d != 0) #(d);
  endtask

  // No output bit may ever show both rails high.
  always @(s) begin
    for (int i = 0; i < 8; i++) begin
      if (s[i].r1 && s[i].r0) begin
        failures++;
        $display("FAIL illegal dual-rail state on s[%0d]", i);
      end
    end
  end

  initial begin
    checks = 0; failures = 0; done_ops = 0; max_inflight = 0; in_waits = 0; out_holds = 0;
    done = 1'b0; sent = 0;
    rst = 1'b1; x = '0; y = '0; ki = 1'b1;
    #5;
    rst = 1'b0;
    #1;
    checks++;
    if (ko !== 1'b1 || s !== '0) begin
      failures++;
      $display("FAIL after reset: ko=%b s=%b", ko, s);
    end
    // Sender.
    fork
      begin
        for (int op = 0; op < int'(N_OPS); op++) begin
          logic [7:0] v;
          v = (EXHAUSTIVE && op < 256) ? 8'(op) : 8'($urandom);
          pause(MAX_DELAY);
          if (ko !== 1'b1) in_waits++;
          wait (ko === 1'b1);
          expq.push_back(model(v));
          for (int i = 0; i < 4; i++) begin
            x[i] = dr_data(v[4 + i]);
            y[i] = dr_data(v[i]);
          end
          sent++;
          if (sent - done_ops > max_inflight) max_inflight = sent - done_ops;
          // The circuit should take the word at once; if ko is still 1 a moment later the word
          // is being held at the input because the circuit (both circuits, under NCR) is busy.
          #1;
          if (ko === 1'b1) in_waits++;
          wait (ko === 1'b0);
          pause(MAX_DELAY);
          x = '0;
          y = '0;
          wait (ko === 1'b1);
        end
      end
      // Receiver.
      begin
        for (int op = 0; op < int'(N_OPS); op++) begin
          logic [7:0] e;
          int unsigned hold;
          while (!all_data(s)) @(s);
          checks++;
          if (expq.size() == 0) begin
            failures++;
            $display("FAIL output %0d with no operation outstanding", op);
          end else begin
            e = expq.pop_front();
            if (decode(s) !== e) begin
              failures++;
              $display("FAIL op %0d: s=%0d expected %0d", op, decode(s), e);
            end
          end
          done_ops++;
          hold = $urandom_range(3);
          if (hold == 0) begin
            out_holds++;
            #(3 * MAX_DELAY + 5);
          end else begin
            pause(MAX_DELAY);
          end
          ki = 1'b0;
          wait (s === '0);
          pause(MAX_DELAY);
          ki = 1'b1;
        end
      end
    join
    done = 1'b1;
  end

endmodule
