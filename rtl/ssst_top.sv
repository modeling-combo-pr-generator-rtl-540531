// ssst_top: combo pseudo-random (PR) generators for stego storage self test.
//
// Four ways of combining 8-bit LFSRs into one pseudo-random stream stand
// side by side, each with its own outputs:
//   Case 1  same frequency, same LFSR      three (8,6,5,4) LFSRs on clk
//   Case 2  different frequency, same LFSR three (8,6,5,4) LFSRs on p/q/r_clk
//   Case 3  different frequency, diff LFSR (8,6,5,4) on p_clk, (8,4,3,2) on q_clk
//   Case 4  same frequency, different LFSR (8,6,5,4) and (8,4,3,2) on clk, XORed
// Cases 1-3 select one LFSR per rising edge of opclk (XOR of their clocks);
// Case 4 samples the XOR of its two LFSRs every clock. Seeds are F0, 0F, 99.
// p_clk, q_clk and r_clk (52.38, 73.33 and 22.9 MHz in the source design)
// come from a PLL outside this module; clk is the 50 MHz system clock.
//
// A stego datapath on clk uses the generated values as pixel addresses:
// stego_ctrl embeds a secret bit (LSB substitution plus an integrity bit in
// bit 1) into, or extracts it from, the pixel of a 256 x 8 stego RAM at the
// address taken from Case 1 (addr_sel = 0) or Case 4 (addr_sel = 1) when
// stego_start is pulsed. The RAM is loaded and read through the host port
// while the controller is idle. Which generators feed the address and the
// controller itself are this design's choices.
//
// reset is asynchronous and active high; it loads all seeds and clears the
// selectors, and restarts the address sequence so that extraction can
// replay the addresses used for embedding.
module ssst_top
  import ssst_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       p_clk,
  input  logic       q_clk,
  input  logic       r_clk,
  // Case 1
  output logic [7:0] c1_lop,
  output logic       c1_valid,
  // Case 2
  output logic [7:0] c2_lop,
  output logic       c2_valid,
  output logic       c2_opclk,
  // Case 3
  output logic [7:0] c3_lop,
  output logic       c3_valid,
  output logic       c3_opclk,
  // Case 4
  output logic [7:0] c4_lop,
  output logic       c4_valid,
  // stego datapath
  input  logic       addr_sel,
  input  logic       stego_start,
  input  stego_op_e  stego_op,
  input  logic       secret_bit,
  output logic       stego_busy,
  output logic       stego_done,
  output logic [7:0] stego_addr,
  output logic       rd_bit,
  output logic       integrity_ok,
  input  logic       host_we,
  input  logic [7:0] host_addr,
  input  pixel_t     host_wdata,
  output pixel_t     host_rdata
);
  // Case 1: the three LFSR clocks are all the 50 MHz clock.
  combo_prg #(
    .N(3), .FB_MASKS({3{FB_8654}}), .SEEDS({SEED_R, SEED_Q, SEED_P})
  ) u_case1 (
    .lfsr_clk  ({clk, clk, clk}),
    .reset     (reset),
    .lfsr_state(),
    .opclk     (),
    .lopresult (c1_lop),
    .lop_valid (c1_valid)
  );

  // Case 2: same LFSRs and seeds, three PLL clocks.
  combo_prg #(
    .N(3), .FB_MASKS({3{FB_8654}}), .SEEDS({SEED_R, SEED_Q, SEED_P})
  ) u_case2 (
    .lfsr_clk  ({r_clk, q_clk, p_clk}),
    .reset     (reset),
    .lfsr_state(),
    .opclk     (c2_opclk),
    .lopresult (c2_lop),
    .lop_valid (c2_valid)
  );

  // Case 3: two different LFSRs on two PLL clocks.
  combo_prg #(
    .N(2), .FB_MASKS({FB_8432, FB_8654}), .SEEDS({SEED_Q, SEED_P})
  ) u_case3 (
    .lfsr_clk  ({q_clk, p_clk}),
    .reset     (reset),
    .lfsr_state(),
    .opclk     (c3_opclk),
    .lopresult (c3_lop),
    .lop_valid (c3_valid)
  );

  // Case 4: two different LFSRs on the 50 MHz clock, XOR sampled each cycle.
  xor_combo_prg u_case4 (
    .clk      (clk),
    .reset    (reset),
    .lp       (),
    .lq       (),
    .lopresult(c4_lop),
    .lop_valid(c4_valid)
  );

  // Stego datapath.
  logic       ram_we;
  logic [7:0] ram_addr;
  pixel_t     ram_wdata, ram_rdata;

  stego_ctrl #(.AW(8)) u_ctrl (
    .clk         (clk),
    .reset       (reset),
    .start       (stego_start),
    .op          (stego_op),
    .secret_bit  (secret_bit),
    .prg_addr    (addr_sel ? c4_lop : c1_lop),
    .busy        (stego_busy),
    .done        (stego_done),
    .addr_used   (stego_addr),
    .rd_bit      (rd_bit),
    .integrity_ok(integrity_ok),
    .host_we     (host_we),
    .host_addr   (host_addr),
    .host_wdata  (host_wdata),
    .host_rdata  (host_rdata),
    .ram_we      (ram_we),
    .ram_addr    (ram_addr),
    .ram_wdata   (ram_wdata),
    .ram_rdata   (ram_rdata)
  );

  stego_ram #(.AW(8), .DW(8)) u_ram (
    .clk  (clk),
    .we   (ram_we),
    .addr (ram_addr),
    .wdata(ram_wdata),
    .rdata(ram_rdata)
  );
endmodule
