// tb_ncr_demux - self-checking test of the NCR input demultiplexer.
//
// For random DATA words it checks that the word reaches output A only when s1 and ki1 are both
// high, reaches B only with s2 and ki2, is held there after s and the input drop while the
// circuit's request stays high, returns to NULL once input, select and request are all low, and
// that ko is 1 exactly when both outputs are NULL.
module tb_ncr_demux;
  import ncl_pkg::*;
  int checks = 0, failures = 0;
  dr_t  [7:0] a, z1, z2;
  logic [7:0] ko;
  logic rst, ki1, ki2, s1, s2;

  ncr_demux #(.WIDTH(8)) dut (.a(a), .rst(rst), .ki1(ki1), .ki2(ki2), .s1(s1), .s2(s2),
                              .z1(z1), .z2(z2), .ko(ko));

  function automatic dr_t [7:0] enc(logic [7:0] v);
    dr_t [7:0] r;
    for (int i = 0; i < 8; i++) r[i] = dr_data(v[i]);
    return r;
  endfunction

  task automatic chk(string n, dr_t [7:0] e1, dr_t [7:0] e2);
    checks++;
    if (z1 !== e1 || z2 !== e2) begin
      failures++;
      $display("FAIL %s: z1=%b z2=%b", n, z1, z2);
    end
    checks++;
    if (ko !== ((e1 == '0 && e2 == '0) ? 8'hff : 8'h00)) begin
      failures++;
      $display("FAIL %s: ko=%b", n, ko);
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
    logic [7:0] v;
    logic side;
    rst = 1'b1; a = '0; ki1 = 1; ki2 = 1; s1 = 0; s2 = 0;
    #1;
    chk("reset", '0, '0);
    rst = 1'b0;
    #1;
    for (int it = 0; it < 500; it++) begin
      v = 8'($urandom);
      side = it[0];
      // Word offered while nothing is selected: held back.
      a = enc(v); #1;
      chk("unselected", '0, '0);
      // Selected but the circuit asks for NULL: still held back.
      if (side) begin ki2 = 0; s2 = 1; end else begin ki1 = 0; s1 = 1; end
      #1;
      chk("selected, rfn", '0, '0);
      if (side) ki2 = 1; else ki1 = 1;
      #1;
      if (side) chk("to B", '0, enc(v)); else chk("to A", enc(v), '0);
      // Circuit accepted (request falls), select drops, input still DATA: held.
      if (side) begin ki2 = 0; s2 = 0; end else begin ki1 = 0; s1 = 0; end
      #1;
      if (side) chk("hold B", '0, enc(v)); else chk("hold A", enc(v), '0);
      a = '0; #1;
      chk("NULL", '0, '0);
      ki1 = 1; ki2 = 1; #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
