// xor_combo_prg: Case 4 of the combo PR generator (same frequency,
// different LFSRs).
//
// lp, an (8,6,5,4) LFSR seeded F0, and lq, an (8,4,3,2) LFSR seeded 0F, run
// on the same 50 MHz clock and each advances once every STEP_DIV cycles.
// XORing two equal clocks would give a constant, so there is no opclk here:
// an output register samples lp XOR lq on every clock edge, so lopresult
// follows the LFSRs one cycle later. With REVERSE_OUT = 1 (default) the XOR
// word is stored in reversed bit order, which is what the published Case 4
// waveform shows (first values FF, E3, DB, AB, 4B, FA, 85); REVERSE_OUT = 0
// gives the plain XOR. The sequence repeats after 255 x STEP_DIV cycles.
// lop_valid marks the first sample after reset (this design's choice).
//
// ALTERNATE = 1 selects the remedy the source proposes for the repeats of
// the XOR form: the register takes lp and lq in turn (lp on the first edge
// after reset), so over 510 cycles each LFSR hands out all of its 255
// values once. ALTERNATE = 0 (default) is the XOR form above.
//
// Ports: clk, reset (asynchronous, active high), lp, lq, lopresult, lop_valid.
module xor_combo_prg
  import ssst_pkg::*;
#(
  parameter logic [7:0]  FB_MASK_P   = FB_8654,
  parameter logic [7:0]  FB_MASK_Q   = FB_8432,
  parameter logic [7:0]  SEED_LP     = SEED_P,
  parameter logic [7:0]  SEED_LQ     = SEED_Q,
  parameter int unsigned STEP_DIV    = 2,
  parameter bit          REVERSE_OUT = 1'b1,
  parameter bit          ALTERNATE   = 1'b0
) (
  input  logic       clk,
  input  logic       reset,
  output logic [7:0] lp,
  output logic [7:0] lq,
  output logic [7:0] lopresult,
  output logic       lop_valid
);
  logic [7:0] mix;
  logic       take_q;   // ALTERNATE: next edge takes lq

  lfsr8 #(.FB_MASK(FB_MASK_P), .SEED(SEED_LP), .STEP_DIV(STEP_DIV)) u_lp (
    .clk(clk), .reset(reset), .state(lp)
  );
  lfsr8 #(.FB_MASK(FB_MASK_Q), .SEED(SEED_LQ), .STEP_DIV(STEP_DIV)) u_lq (
    .clk(clk), .reset(reset), .state(lq)
  );

  always_comb begin
    if (ALTERNATE) begin
      mix = take_q ? lq : lp;
    end else begin
      mix = lp ^ lq;
      if (REVERSE_OUT) mix = bit_reverse(mix);
    end
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      lopresult <= '0;
      lop_valid <= 1'b0;
      take_q    <= 1'b0;
    end else begin
      lopresult <= mix;
      lop_valid <= 1'b1;
      take_q    <= ALTERNATE ? ~take_q : 1'b0;
    end
  end
endmodule
