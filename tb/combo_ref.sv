// combo_ref: reference model of a combo PR generator for the testbenches.
//
// Keeps its own copy of N LFSRs (stage equations written bit by bit from the
// feedback mask), steps each one on every second rising edge of its clock,
// forms its own opclk and takes the LFSRs in turn on its rising edges. It
// also reports, for every selection, how many steps the chosen LFSR made
// since it was last selected: 1 is normal, 0 a repeated value, 2 or more
// means values were skipped. Not synthesizable.
module combo_ref #(
  parameter int unsigned       N        = 3,
  parameter logic [N-1:0][7:0] FB_MASKS = {N{8'h8E}},
  parameter logic [N-1:0][7:0] SEEDS    = {8'h99, 8'h0F, 8'hF0}
) (
  input  logic [N-1:0] clk_in,
  input  logic         reset,
  output logic [7:0]   exp_lop,
  output logic         exp_valid,
  output int           n_select,
  output int           n_repeat,
  output int           n_skip
);
  timeunit 1ns; timeprecision 1ps;

  logic [7:0] st  [N];
  int         idx [N];
  int         last_idx [N];
  logic       op;
  int         sel;

  assign op = ^clk_in;

  function automatic logic [7:0] step8(logic [7:0] l, logic [7:0] m);
    logic [7:0] n;
    n[7] = l[0];
    for (int i = 0; i < 7; i++) n[i] = l[i+1] ^ (m[i] & l[0]);
    return n;
  endfunction

  for (genvar i = 0; i < N; i++) begin : g
    bit half;
    always @(posedge clk_in[i] or posedge reset) begin
      if (reset) begin
        st[i]  <= SEEDS[i];
        idx[i] <= 0;
        half   <= 1'b0;
      end else begin
        half <= ~half;
        if (half) begin
          st[i]  <= step8(st[i], FB_MASKS[i]);
          idx[i] <= idx[i] + 1;
        end
      end
    end
  end

  always @(posedge op or posedge reset) begin
    if (reset) begin
      sel       <= 0;
      exp_lop   <= '0;
      exp_valid <= 1'b0;
      n_select  <= 0;
      n_repeat  <= 0;
      n_skip    <= 0;
      for (int i = 0; i < N; i++) last_idx[i] <= -1;
    end else begin
      exp_lop   <= st[sel];
      exp_valid <= 1'b1;
      n_select  <= n_select + 1;
      if (last_idx[sel] >= 0 && idx[sel] == last_idx[sel])     n_repeat <= n_repeat + 1;
      if (last_idx[sel] >= 0 && idx[sel] >  last_idx[sel] + 1) n_skip   <= n_skip + 1;
      last_idx[sel] <= idx[sel];
      sel <= (sel == N - 1) ? 0 : sel + 1;
    end
  end
endmodule
