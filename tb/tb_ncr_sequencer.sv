// tb_ncr_sequencer - self-checking test of the four-phase select ring.
//
// After reset with ki = 1 (the requests start as rfd) the selects must repeat the pattern
// s1 = 1,0,0,0 and s2 = 0,0,1,0 over the four phases ki = 1,0,1,0, for 50 rounds, and must stay
// put while ki does not change.
module tb_ncr_sequencer;
  int checks = 0, failures = 0;
  logic ki, rst, s1, s2;
  localparam logic [3:0] S1_PAT = 4'b1000;   // phase 0 first (MSB)
  localparam logic [3:0] S2_PAT = 4'b0010;

  ncr_sequencer dut (.ki(ki), .rst(rst), .s1(s1), .s2(s2));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; ki = 1'b1;
    #1;
    rst = 1'b0;
    #1;
    for (int ph = 0; ph < 200; ph++) begin
      for (int rep = 0; rep < 2; rep++) begin
        checks++;
        if (s1 !== S1_PAT[3 - ph % 4] || s2 !== S2_PAT[3 - ph % 4]) begin
          failures++;
          $display("FAIL phase %0d: s1=%b s2=%b", ph, s1, s2);
        end
        #1;
      end
      ki = ~ki;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
