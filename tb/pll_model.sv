// pll_model: behavioural model of the clock synthesiser that feeds the
// different-frequency generator cases (not synthesizable).
//
// It produces three free-running square waves with the periods given in
// picoseconds: by default 52.38 MHz (19091 ps), 73.33 MHz (13637 ps) and
// 22.9 MHz (43668 ps), the p, q and r clocks of the source design. The
// clocks start low, begin toggling after START_PS and keep a 50 % duty
// cycle; there is no lock time, jitter or phase relation to any input.
module pll_model #(
  parameter int unsigned P_PERIOD_PS = 19091,
  parameter int unsigned Q_PERIOD_PS = 13637,
  parameter int unsigned R_PERIOD_PS = 43668,
  parameter int unsigned START_PS    = 1000
) (
  output logic p_clk,
  output logic q_clk,
  output logic r_clk
);
  timeunit 1ns; timeprecision 1ps;

  initial begin
    p_clk = 1'b0;
    #(START_PS * 1ps);
    forever begin
      #((P_PERIOD_PS / 2) * 1ps) p_clk = 1'b1;
      #((P_PERIOD_PS - P_PERIOD_PS / 2) * 1ps) p_clk = 1'b0;
    end
  end
  initial begin
    q_clk = 1'b0;
    #(START_PS * 1ps);
    forever begin
      #((Q_PERIOD_PS / 2) * 1ps) q_clk = 1'b1;
      #((Q_PERIOD_PS - Q_PERIOD_PS / 2) * 1ps) q_clk = 1'b0;
    end
  end
  initial begin
    r_clk = 1'b0;
    #(START_PS * 1ps);
    forever begin
      #((R_PERIOD_PS / 2) * 1ps) r_clk = 1'b1;
      #((R_PERIOD_PS - R_PERIOD_PS / 2) * 1ps) r_clk = 1'b0;
    end
  end
endmodule
