// tb_ncl_register - self-checking test of the dual-rail NCL register stage.
//
// Checks reset to NULL (ko = 1), then runs random four-phase cycles on a 4-bit register: DATA is
// held back while ki = 0, passes when ki rises, is held when the input returns to NULL until ki
// falls, and ko mirrors the output state bit by bit. A second instance with INIT_NULL = 0 must
// reset to DATA0.
module tb_ncl_register;
  import ncl_pkg::*;

  localparam int W = 4;
  int checks = 0, failures = 0;
  dr_t  [W-1:0] d, q, q0;
  logic [W-1:0] ki, ko, ko0;
  logic rst;

  ncl_register #(.WIDTH(W))                  dut  (.d(d), .ki(ki), .rst(rst), .q(q),  .ko(ko));
  ncl_register #(.WIDTH(W), .INIT_NULL(1'b0)) dut0 (.d(d), .ki(ki), .rst(rst), .q(q0), .ko(ko0));

  task automatic expect_q(string what, dr_t [W-1:0] exp);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%b exp=%b", what, q, exp);
    end
    for (int i = 0; i < W; i++) begin
      checks++;
      if (ko[i] !== dr_is_null(exp[i])) begin
        failures++;
        $display("FAIL %s: ko[%0d]=%b", what, i, ko[i]);
      end
    end
  endtask

  function automatic dr_t [W-1:0] enc(logic [W-1:0] v);
    dr_t [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = dr_data(v[i]);
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] v;
    d = '0; ki = '0; rst = 1'b1;
    #1;
    expect_q("reset", '0);
    checks++;
    if (q0 !== enc('0)) begin failures++; $display("FAIL INIT_NULL=0 reset q=%b", q0); end
    rst = 1'b0;
    #1;
    for (int it = 0; it < 300; it++) begin
      v = W'($urandom);
      ki = '0; #1;
      d = enc(v); #1;
      expect_q("DATA held back while rfn", '0);
      ki = '1; #1;
      expect_q("DATA passed", enc(v));
      d = '0; #1;
      expect_q("DATA held while rfd", enc(v));
      ki = '0; #1;
      expect_q("NULL passed", '0);
      ki = '1; #1;
      // Per-bit request: only bits whose ki is set take the new DATA.
      ki = W'($urandom);
      d = enc(~v); #1;
      begin
        dr_t [W-1:0] e;
        for (int i = 0; i < W; i++) e[i] = ki[i] ? dr_data(~v[i]) : dr_t'(2'b00);
        expect_q("per-bit request", e);
      end
      ki = '1; #1;
      d = '0; #1;
      ki = '0; #1;
      ki = '1; #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
