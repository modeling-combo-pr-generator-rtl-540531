// tb_lfsr8: checks the 8-bit LFSR against a bit-level reference.
//
// Three instances: (8,6,5,4) seeded F0 and (8,4,3,2) seeded 0F with the
// default two-cycle step, and (8,6,5,4) seeded FF stepping every cycle.
// The reference writes out each stage's input as drawn in the structure
// diagrams. Also checked: the first published values of both LFSRs, each
// value held for exactly two cycles, a period of 255 steps (510 cycles) and
// that no value repeats inside one period.
module tb_lfsr8;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  logic reset = 1'b1;
  always #10 clk = ~clk;

  logic [7:0] s_p, s_q, s_f;

  lfsr8 #(.FB_MASK(8'h8E), .SEED(8'hF0))                 dut_p (.clk, .reset, .state(s_p));
  lfsr8 #(.FB_MASK(8'hB8), .SEED(8'h0F))                 dut_q (.clk, .reset, .state(s_q));
  lfsr8 #(.FB_MASK(8'h8E), .SEED(8'hFF), .STEP_DIV(1))   dut_f (.clk, .reset, .state(s_f));

  int checks = 0, failures = 0;

  // (8,6,5,4): ln7<-ln0, ln6<-ln7, ln5<-ln6, ln4<-ln5, ln3<-ln4^ln0,
  // ln2<-ln3^ln0, ln1<-ln2^ln0, ln0<-ln1
  function automatic logic [7:0] ref_8654(logic [7:0] l);
    return {l[0], l[7], l[6], l[5], l[4]^l[0], l[3]^l[0], l[2]^l[0], l[1]};
  endfunction
  // (8,4,3,2): ln7<-ln0, ln6<-ln7, ln5<-ln6^ln0, ln4<-ln5^ln0, ln3<-ln4^ln0,
  // ln2<-ln3, ln1<-ln2, ln0<-ln1
  function automatic logic [7:0] ref_8432(logic [7:0] l);
    return {l[0], l[7], l[6]^l[0], l[5]^l[0], l[4]^l[0], l[3], l[2], l[1]};
  endfunction

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [7:0] pub_p [6] = '{8'hF0, 8'h78, 8'h3C, 8'h1E, 8'h0F, 8'h89};
  logic [7:0] pub_q [7] = '{8'h0F, 8'hBF, 8'hE7, 8'hCB, 8'hDD, 8'hD6, 8'h6B};

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ep, eq, ef;
    bit seen [256];
    repeat (2) @(posedge clk);
    #3 reset = 1'b0;
    ep = 8'hF0; eq = 8'h0F; ef = 8'hFF;
    check("seed p", s_p, ep);
    check("seed q", s_q, eq);
    check("seed f", s_f, ef);
    for (int c = 1; c <= 1020; c++) begin
      @(posedge clk); #1;
      if (c % 2 == 0) begin
        ep = ref_8654(ep);
        eq = ref_8432(eq);
      end
      ef = ref_8654(ef);
      check("p", s_p, ep);
      check("q", s_q, eq);
      check("f", s_f, ef);
      if (c / 2 < 6 && c % 2 == 1) check("published p", s_p, pub_p[c/2]);
      if (c / 2 < 7 && c % 2 == 1) check("published q", s_q, pub_q[c/2]);
      if (c == 510) begin
        check("p period 510 cycles", s_p, 8'hF0);
        check("q period 510 cycles", s_q, 8'h0F);
      end
    end
    // 255 distinct non-zero values in one period of the fast instance.
    begin
      int distinct = 0;
      for (int i = 0; i < 255; i++) begin
        @(posedge clk); #1;
        if (!seen[s_f]) distinct++;
        seen[s_f] = 1'b1;
      end
      checks++;
      if (distinct != 255 || seen[0]) begin
        failures++;
        $display("FAIL period: %0d distinct values", distinct);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
