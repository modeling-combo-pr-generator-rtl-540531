// tb_xor_combo_prg: checks the Case 4 generator (two LFSRs on one clock,
// output = their XOR sampled every cycle).
// The default instance must give the published sequence FF E3 DB AB 4B FA 85
// (each value for two cycles, one cycle behind the LFSRs) and must follow a
// reference built from its own LFSR equations for 1100 cycles, repeating
// after 510 cycles. A second instance with REVERSE_OUT = 0 must give the
// plain XOR. A third instance with ALTERNATE = 1 must take lp and lq in
// turn and, over 510 cycles, hand out each LFSR's 255 values exactly once.
module tb_xor_combo_prg;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  logic reset = 1'b1;
  always #10 clk = ~clk;

  logic [7:0] lp, lq, lop, lp0, lq0, lop0;
  logic v, v0;

  xor_combo_prg dut (.clk, .reset, .lp, .lq, .lopresult(lop), .lop_valid(v));
  xor_combo_prg #(.REVERSE_OUT(1'b0)) dut_plain (.clk, .reset, .lp(lp0), .lq(lq0),
                                                 .lopresult(lop0), .lop_valid(v0));

  logic [7:0] lpa, lqa, lopa;
  logic va;
  xor_combo_prg #(.ALTERNATE(1'b1)) dut_alt (.clk, .reset, .lp(lpa), .lq(lqa),
                                             .lopresult(lopa), .lop_valid(va));

  int checks = 0, failures = 0;
  bit seen_p [256], seen_q [256];
  int dup_alt = 0, new_alt = 0;

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  function automatic logic [7:0] n8654(logic [7:0] l);
    return {l[0], l[7], l[6], l[5], l[4]^l[0], l[3]^l[0], l[2]^l[0], l[1]};
  endfunction
  function automatic logic [7:0] n8432(logic [7:0] l);
    return {l[0], l[7], l[6]^l[0], l[5]^l[0], l[4]^l[0], l[3], l[2], l[1]};
  endfunction
  function automatic logic [7:0] rev(logic [7:0] x);
    return {x[0], x[1], x[2], x[3], x[4], x[5], x[6], x[7]};
  endfunction

  logic [7:0] fig6 [7] = '{8'hFF, 8'hE3, 8'hDB, 8'hAB, 8'h4B, 8'hFA, 8'h85};
  logic [7:0] first_seq [510];

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    checks++;
    if (dup_alt != 0 || new_alt != 510 || seen_p[0] || seen_q[0]) begin
      failures++;
      $display("FAIL alternate coverage: %0d new, %0d repeated", new_alt, dup_alt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] mp, mq, prev_p, prev_q;
    repeat (2) @(posedge clk);
    #3 reset = 1'b0;
    mp = 8'hF0; mq = 8'h0F;
    checks++;
    if (v) begin failures++; $display("FAIL valid during reset"); end
    for (int c = 1; c <= 1100; c++) begin
      prev_p = mp; prev_q = mq;
      if (c % 2 == 0) begin mp = n8654(mp); mq = n8432(mq); end
      @(posedge clk); #1;
      // output register holds the XOR of the values before this edge
      check("lop", lop, rev(prev_p ^ prev_q));
      check("lop plain", lop0, prev_p ^ prev_q);
      check("alternate", lopa, (c % 2 == 1) ? prev_p : prev_q);
      if (c <= 510) begin
        if (c % 2 == 1) begin if (seen_p[lopa]) dup_alt++; else new_alt++; seen_p[lopa] = 1'b1; end
        else            begin if (seen_q[lopa]) dup_alt++; else new_alt++; seen_q[lopa] = 1'b1; end
      end
      check("lp", lp, mp);
      check("lq", lq, mq);
      if (c >= 1 && c <= 14) check("published", lop, fig6[(c-1)/2]);
      if (c <= 510) first_seq[c-1] = lop;
      else if (c <= 1020) check("period 510", lop, first_seq[c-511]);
    end
    checks++;
    if (dup_alt != 0 || new_alt != 510 || seen_p[0] || seen_q[0]) begin
      failures++;
      $display("FAIL alternate coverage: %0d new, %0d repeated", new_alt, dup_alt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
