// tb_seq_distribution: sequence distribution of the (8,6,5,4) LFSR, the
// analysis used to choose a seed for memory-address generation.
//
// One lfsr8 per seed steps every clock cycle (STEP_DIV = 1) for 256 cycles.
// Its outputs are binned two ways: four windows of 64 cycles against four
// value ranges of 64 (0-63 ... 192-255), and eight windows of 32 cycles
// against eight ranges of 32. Seeds: 11110000, 00001111, 01111111,
// 00000001 and 11111111. The hardware counts are compared with a software
// LFSR, and two observations are checked: with seed 11110000 no value in
// 0-31 appears during cycles 160-191, and every count table sums to its
// window length. The tables are printed.
module tb_seq_distribution;
  timeunit 1ns; timeprecision 1ps;

  localparam int NS = 5;
  localparam logic [NS-1:0][7:0] SEEDS = {8'hFF, 8'h01, 8'h7F, 8'h0F, 8'hF0};

  logic clk = 1'b0;
  logic reset = 1'b1;
  always #5 clk = ~clk;

  logic [NS-1:0][7:0] st;
  for (genvar i = 0; i < NS; i++) begin : g
    lfsr8 #(.FB_MASK(8'h8E), .SEED(SEEDS[i]), .STEP_DIV(1)) u (.clk, .reset, .state(st[i]));
  end

  int checks = 0, failures = 0;
  int q4 [NS][4][4];   // [seed][window][range]
  int q8 [NS][8][8];

  function automatic logic [7:0] sw_step(logic [7:0] l);
    logic fb = l[0];
    l = l >> 1;
    if (fb) l = l ^ 8'b1000_1110;
    return l;
  endfunction

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] m [NS];
    int sw4 [NS][4][4];
    for (int s = 0; s < NS; s++) begin
      m[s] = SEEDS[s];
      for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++) begin q4[s][a][b] = 0; sw4[s][a][b] = 0; end
      for (int a = 0; a < 8; a++) for (int b = 0; b < 8; b++) q8[s][a][b] = 0;
    end
    @(posedge clk);
    #1 reset = 1'b0;
    // cycle c counts the value held during clock cycle c (seed first)
    for (int c = 0; c < 256; c++) begin
      for (int s = 0; s < NS; s++) begin
        checks++;
        if (st[s] !== m[s]) begin failures++; $display("FAIL seed %h cycle %0d: %h vs %h", SEEDS[s], c, st[s], m[s]); end
        q4[s][c / 64][st[s] / 64]++;
        q8[s][c / 32][st[s] / 32]++;
        sw4[s][c / 64][m[s] / 64]++;
        m[s] = sw_step(m[s]);
      end
      @(posedge clk); #1;
    end
    for (int s = 0; s < NS; s++) begin
      $display("seed %b, 4 windows x 4 ranges:", SEEDS[s]);
      for (int w = 0; w < 4; w++) begin
        int sum;
        sum = 0;
        $display("  cycles %3d-%3d: %3d %3d %3d %3d", w * 64, w * 64 + 63,
                 q4[s][w][0], q4[s][w][1], q4[s][w][2], q4[s][w][3]);
        for (int r = 0; r < 4; r++) begin
          sum += q4[s][w][r];
          checks++;
          if (q4[s][w][r] != sw4[s][w][r]) begin failures++; $display("FAIL table mismatch"); end
        end
        checks++;
        if (sum != 64) begin failures++; $display("FAIL window sum %0d", sum); end
      end
      $display("seed %b, 8 windows x 8 ranges:", SEEDS[s]);
      for (int w = 0; w < 8; w++)
        $display("  cycles %3d-%3d: %3d %3d %3d %3d %3d %3d %3d %3d", w * 32, w * 32 + 31,
                 q8[s][w][0], q8[s][w][1], q8[s][w][2], q8[s][w][3],
                 q8[s][w][4], q8[s][w][5], q8[s][w][6], q8[s][w][7]);
    end
    // seed 11110000, cycles 160-191: no value in 0-31
    checks++;
    if (q8[0][5][0] != 0) begin failures++; $display("FAIL F0 window 160-191 has %0d values in 0-31", q8[0][5][0]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
