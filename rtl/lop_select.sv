// lop_select: round-robin output register of the combo PR generator.
//
// On every rising edge of opclk it stores the value of one LFSR into
// lopresult, taking the LFSRs in turn: lp on the first edge after reset,
// lq on the next, then lr (for N = 3) and back to lp. The value stored is
// the one the LFSR holds just before that edge. lop_valid goes high with the
// first stored value (the source waveforms show no value until then).
// The asynchronous active-high reset and lop_valid are this design's choice.
//
// Ports: opclk, reset, lfsr_val[i] (value of LFSR i), lopresult, lop_valid.
module lop_select #(
  parameter int unsigned N = 3,
  parameter int unsigned W = 8
) (
  input  logic                 opclk,
  input  logic                 reset,
  input  logic [N-1:0][W-1:0]  lfsr_val,
  output logic [W-1:0]         lopresult,
  output logic                 lop_valid
);
  localparam int unsigned SW = $clog2(N+1);

  // Index of the LFSR the next opclk edge takes.
  logic [SW-1:0] sel;

  always_ff @(posedge opclk or posedge reset) begin
    if (reset) begin
      sel       <= '0;
      lopresult <= '0;
      lop_valid <= 1'b0;
    end else begin
      lopresult <= lfsr_val[sel];
      lop_valid <= 1'b1;
      sel       <= (sel == SW'(N - 1)) ? '0 : sel + 1'b1;
    end
  end
endmodule
