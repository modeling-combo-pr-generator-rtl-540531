// lfsr8: one 8-bit Galois LFSR of the combo PR generator.
//
// The register shifts towards ln(0); ln(0) re-enters at ln(7) and is XORed
// into the stages marked in FB_MASK (see ssst_pkg). SEED is loaded while
// reset is high (asynchronous, active high). After reset the register moves
// one step every STEP_DIV rising clock edges: with the default of 2 it holds
// each value for two clock cycles, the behaviour the source design shows in
// all of its waveforms ("each LFSR consumes two clock cycles for producing a
// change"), so a maximal LFSR repeats after 255 x 2 = 510 cycles.
// The first step happens on the STEP_DIV-th edge after reset is released.
// The asynchronous reset and the divide counter are this design's choice.
//
// Ports: clk, reset, state (current LFSR value).
module lfsr8 #(
  parameter logic [7:0]  FB_MASK  = 8'h8E,
  parameter logic [7:0]  SEED     = 8'hF0,
  parameter int unsigned STEP_DIV = 2
) (
  input  logic       clk,
  input  logic       reset,
  output logic [7:0] state
);
  import ssst_pkg::*;

  localparam int unsigned CW = (STEP_DIV > 1) ? $clog2(STEP_DIV) : 1;

  logic [CW-1:0] div_cnt;
  logic          step;

  assign step = (STEP_DIV <= 1) || (div_cnt == CW'(STEP_DIV - 1));

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      div_cnt <= '0;
      state   <= SEED;
    end else begin
      div_cnt <= step ? '0 : div_cnt + 1'b1;
      if (step) state <= lfsr_next(state, FB_MASK);
    end
  end

  initial begin
    assert (SEED != 8'h00) else $error("lfsr8: an all-zero seed locks the LFSR");
    assert (STEP_DIV >= 1) else $error("lfsr8: STEP_DIV must be at least 1");
  end
endmodule
