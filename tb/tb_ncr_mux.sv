// tb_ncr_mux - self-checking test of the NCR output multiplexer.
//
// Random DATA values appear on either input while the other is NULL; the output must carry that
// DATA, and NULL when both inputs are NULL.
module tb_ncr_mux;
  import ncl_pkg::*;
  int checks = 0, failures = 0;
  dr_t [7:0] a1, a2, z;

  ncr_mux #(.WIDTH(8)) dut (.a1(a1), .a2(a2), .z(z));

  function automatic dr_t [7:0] enc(logic [7:0] v);
    dr_t [7:0] r;
    for (int i = 0; i < 8; i++) r[i] = dr_data(v[i]);
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
    logic [7:0] v;
    a1 = '0; a2 = '0;
    #1;
    for (int it = 0; it < 1000; it++) begin
      v = 8'($urandom);
      if (it % 2 == 0) a1 = enc(v); else a2 = enc(v);
      #1;
      checks++;
      if (z !== enc(v)) begin failures++; $display("FAIL data side %0d: z=%b", it % 2, z); end
      a1 = '0; a2 = '0;
      #1;
      checks++;
      if (z !== '0) begin failures++; $display("FAIL NULL: z=%b", z); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
