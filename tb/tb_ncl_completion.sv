// tb_ncl_completion - self-checking test of the full-word completion detector.
//
// Three widths (8, the design's, plus 5 and 16 for the tree edges) see monotonic wavefronts, as in
// an NCL circuit: bits rise one by one in random order, then fall likewise. The output must rise only when all inputs are 1, fall only when all are 0, and hold otherwise,
// matching a reference C-element model.
module tb_ncl_completion;
  int checks = 0, failures = 0;
  logic [7:0]  a8;
  logic [4:0]  a5;
  logic [15:0] a16;
  logic z8, z5, z16, r8, r5, r16;

  ncl_completion #(.WIDTH(8))  u8  (.a(a8),  .z(z8));
  ncl_completion #(.WIDTH(5))  u5  (.a(a5),  .z(z5));
  ncl_completion #(.WIDTH(16)) u16 (.a(a16), .z(z16));

  task automatic chk(string n, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %b exp %b", n, got, exp); end
  endtask

  // Random permutation of 0..w-1 in p[0..w-1] (Fisher-Yates).
  task automatic shuffle(output int p[16], input int w);
    for (int i = 0; i < 16; i++) p[i] = i;
    for (int i = w - 1; i > 0; i--) begin
      int j, t;
      j = int'($urandom_range(i));
      t = p[i];
      p[i] = p[j];
      p[j] = t;
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = '0; a5 = '0; a16 = '0;
    #1;
    r8 = 0; r5 = 0; r16 = 0;
    chk("init8", z8, 0); chk("init5", z5, 0); chk("init16", z16, 0);
    // Wavefronts are monotonic: from all-0 the bits rise one at a time in random order, then
    // fall one at a time, possibly interleaved between the three widths.
    for (int it = 0; it < 4000; it++) begin
      logic up;
      int p8[16], p5[16], p16[16];
      up = (it % 2) == 0;
      shuffle(p8, 8);
      shuffle(p5, 5);
      shuffle(p16, 16);
      for (int step = 0; step < 16; step++) begin
        if (step < 8) a8[p8[step]] = up;
        if (step < 5) a5[p5[step]] = up;
        a16[p16[step]] = up;
        #1;
        r8  = (&a8)  ? 1'b1 : ((a8  == 0) ? 1'b0 : r8);
        r5  = (&a5)  ? 1'b1 : ((a5  == 0) ? 1'b0 : r5);
        r16 = (&a16) ? 1'b1 : ((a16 == 0) ? 1'b0 : r16);
        chk("w8", z8, r8); chk("w5", z5, r5); chk("w16", z16, r16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
