// tb_combo_prg: checks the combined multi-LFSR generator in its three
// configurations against the reference model combo_ref.
//   Case 1: three (8,6,5,4) LFSRs on one 50 MHz clock. The first ten
//           outputs must be the published F0 0F C2 78 CA 61 1E 65 5F 0F, a
//           new value must appear every clock cycle, one LFSR value in three
//           must be skipped, and the output repeats after 510 cycles.
//   Case 2: the same LFSRs on 52.38 / 73.33 / 22.9 MHz clocks.
//   Case 3: (8,6,5,4) seed F0 and (8,4,3,2) seed 0F on 52.38 / 73.33 MHz.
// Every output change is compared with the model; Cases 2 and 3 must show
// repeated values, as the source design reports for them.
module tb_combo_prg;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  logic reset = 1'b1;
  always #10 clk = ~clk;   // 50 MHz

  logic p_clk, q_clk, r_clk;
  pll_model u_pll (.p_clk, .q_clk, .r_clk);

  // DUTs
  logic [2:0][7:0] st1, st2;
  logic [1:0][7:0] st3;
  logic op1, op2, op3;
  logic [7:0] lop1, lop2, lop3;
  logic v1, v2, v3;

  combo_prg dut1 (.lfsr_clk({clk, clk, clk}), .reset, .lfsr_state(st1), .opclk(op1),
                  .lopresult(lop1), .lop_valid(v1));
  combo_prg dut2 (.lfsr_clk({r_clk, q_clk, p_clk}), .reset, .lfsr_state(st2), .opclk(op2),
                  .lopresult(lop2), .lop_valid(v2));
  combo_prg #(.N(2), .FB_MASKS({8'hB8, 8'h8E}), .SEEDS({8'h0F, 8'hF0}))
    dut3 (.lfsr_clk({q_clk, p_clk}), .reset, .lfsr_state(st3), .opclk(op3),
          .lopresult(lop3), .lop_valid(v3));

  // Reference models
  logic [7:0] e1, e2, e3;
  logic ev1, ev2, ev3;
  int ns1, nr1, nk1, ns2, nr2, nk2, ns3, nr3, nk3;

  combo_ref #(.N(3)) ref1 (.clk_in({clk, clk, clk}), .reset, .exp_lop(e1), .exp_valid(ev1),
                           .n_select(ns1), .n_repeat(nr1), .n_skip(nk1));
  combo_ref #(.N(3)) ref2 (.clk_in({r_clk, q_clk, p_clk}), .reset, .exp_lop(e2), .exp_valid(ev2),
                           .n_select(ns2), .n_repeat(nr2), .n_skip(nk2));
  combo_ref #(.N(2), .FB_MASKS({8'hB8, 8'h8E}), .SEEDS({8'h0F, 8'hF0}))
    ref3 (.clk_in({q_clk, p_clk}), .reset, .exp_lop(e3), .exp_valid(ev3),
          .n_select(ns3), .n_repeat(nr3), .n_skip(nk3));

  int checks = 0, failures = 0;

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h at %t", what, got, exp, $time); end
  endtask

  // Compare right after every change of the model or the DUT.
  always @(e1 or lop1 or ev1 or v1) if (!reset) begin #1ps; check("case1", lop1, e1); check("case1 valid", 8'(v1), 8'(ev1)); end
  always @(e2 or lop2 or ev2 or v2) if (!reset) begin #1ps; check("case2", lop2, e2); check("case2 valid", 8'(v2), 8'(ev2)); end
  always @(e3 or lop3 or ev3 or v3) if (!reset) begin #1ps; check("case3", lop3, e3); check("case3 valid", 8'(v3), 8'(ev3)); end

  initial begin : watchdog
    #100us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] fig1 [10] = '{8'hF0, 8'h0F, 8'hC2, 8'h78, 8'hCA, 8'h61, 8'h1E, 8'h65, 8'h5F, 8'h0F};
  logic [7:0] first_seq [510];

  initial begin
    repeat (2) @(posedge clk);
    #5 reset = 1'b0;
    // Case 1: one new value per clock cycle, published start of sequence.
    for (int c = 0; c < 1020; c++) begin
      @(posedge clk); #2;
      if (c < 10) check("case1 published", lop1, fig1[c]);
      if (c < 510) first_seq[c] = lop1;
      else check("case1 period 510", lop1, first_seq[c - 510]);
    end
    checks++;
    if (ns1 != 1020) begin failures++; $display("FAIL case1 selections %0d", ns1); end
    // 1020 selections, every LFSR skips one value in three after the first
    checks++;
    if (nk1 < 300 || nr1 != 0) begin failures++; $display("FAIL case1 skips %0d repeats %0d", nk1, nr1); end
    #20us;
    checks++;
    if (nr2 == 0 || ns2 < 100) begin failures++; $display("FAIL case2 no repeats (%0d sel)", ns2); end
    checks++;
    if (nr3 == 0 || ns3 < 100) begin failures++; $display("FAIL case3 no repeats (%0d sel)", ns3); end
    $display("case1: %0d selections, %0d skips, %0d repeats", ns1, nk1, nr1);
    $display("case2: %0d selections, %0d skips, %0d repeats", ns2, nk2, nr2);
    $display("case3: %0d selections, %0d skips, %0d repeats", ns3, nk3, nr3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
