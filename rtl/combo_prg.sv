// combo_prg: combined multiple-LFSR pseudo-random generator (cases 1-3).
//
// N 8-bit LFSRs (lp, lq, lr) run on their own clocks lfsr_clk[0..N-1], each
// loaded with its own seed on reset and advancing once every STEP_DIV of its
// clock edges. opclk, the XOR of the N clocks, drives a round-robin output
// register: each rising edge of opclk copies the next LFSR (lp, lq, lr, lp,
// ...) into lopresult.
//   Case 1: three (8,6,5,4) LFSRs, seeds F0/0F/99, all on the 50 MHz clock;
//           opclk equals that clock, one value in three is skipped.
//   Case 2: same LFSRs on 52.38, 73.33 and 22.9 MHz clocks (from a PLL).
//   Case 3: (8,6,5,4) seed F0 and (8,4,3,2) seed 0F on 52.38 and 73.33 MHz.
// The defaults are Case 1 / Case 2 (the same logic; only the clocks differ).
// Index 0 of FB_MASKS and SEEDS is lp.
//
// Ports: lfsr_clk (one clock per LFSR), reset (asynchronous, active high),
// lfsr_state (LFSR contents), opclk, lopresult, lop_valid.
module combo_prg
  import ssst_pkg::*;
#(
  parameter int unsigned            N        = 3,
  parameter logic [N-1:0][7:0]      FB_MASKS = {N{FB_8654}},
  parameter logic [N-1:0][7:0]      SEEDS    = {SEED_R, SEED_Q, SEED_P},
  parameter int unsigned            STEP_DIV = 2
) (
  input  logic [N-1:0]       lfsr_clk,
  input  logic               reset,
  output logic [N-1:0][7:0]  lfsr_state,
  output logic               opclk,
  output logic [7:0]         lopresult,
  output logic               lop_valid
);
  for (genvar i = 0; i < N; i++) begin : g_lfsr
    lfsr8 #(
      .FB_MASK (FB_MASKS[i]),
      .SEED    (SEEDS[i]),
      .STEP_DIV(STEP_DIV)
    ) u_lfsr (
      .clk  (lfsr_clk[i]),
      .reset(reset),
      .state(lfsr_state[i])
    );
  end

  opclk_xor #(.N(N)) u_opclk (
    .clk_in(lfsr_clk),
    .opclk (opclk)
  );

  lop_select #(.N(N), .W(8)) u_sel (
    .opclk    (opclk),
    .reset    (reset),
    .lfsr_val (lfsr_state),
    .lopresult(lopresult),
    .lop_valid(lop_valid)
  );
endmodule
