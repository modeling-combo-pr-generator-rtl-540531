# Combo pseudo-random generators for stego storage self test

A hardware steganography system hides secret bits in the pixels of an image
held in on-chip block RAM. The same memory has to be self-tested. Both jobs
need a cheap stream of pseudo-random 8-bit addresses that reaches every part
of the memory quickly. This design builds four such address generators. Each
one combines two or three 8-bit linear feedback shift registers (LFSRs) in a
different way:

| Case | LFSRs | Clocks | How the output is formed |
|------|-------|--------|--------------------------|
| 1 | three (8,6,5,4), seeds F0, 0F, 99 | all on the 50 MHz clock | round robin on edges of `opclk` = XOR of the clocks |
| 2 | three (8,6,5,4), seeds F0, 0F, 99 | 52.38, 73.33, 22.9 MHz | round robin on edges of `opclk` |
| 3 | (8,6,5,4) seed F0, (8,4,3,2) seed 0F | 52.38, 73.33 MHz | round robin on edges of `opclk` |
| 4 | (8,6,5,4) seed F0, (8,4,3,2) seed 0F | both on 50 MHz | XOR of the two LFSRs, sampled every cycle |

The top level, `ssst_top`, also holds a small stego datapath. It takes an
address from a generator, hides a secret bit in the pixel stored there, and
can later extract and check that bit. The check uses an integrity bit
written next to the LSB.

## The LFSRs (`lfsr8`)

Both LFSRs are 8-bit right-shifting Galois registers, with stages
ln(7)..ln(0). Each clock step does the following:

* ln(0) leaves as the output bit and re-enters at ln(7);
* every other stage takes the value of the stage above it;
* three of those stages also XOR in the fed-back ln(0).

| Name | Stages receiving ln(0) | `FB_MASK` | Period |
|------|------------------------|-----------|--------|
| (8,6,5,4), P8(x) = 1 + x^4 + x^5 + x^6 + x^8 | ln(3), ln(2), ln(1) | `8'h8E` | 255 |
| (8,4,3,2) | ln(5), ln(4), ln(3) | `8'hB8` | 255 |

A step is therefore `next = (s >> 1) ^ (s[0] ? FB_MASK : 0)`. For example,
the (8,6,5,4) LFSR seeded F0 runs F0, 78, 3C, 1E, 0F, 89, CA, 65, ..., and
the (8,4,3,2) LFSR seeded 0F runs 0F, BF, E7, CB, DD, D6, 6B, 8D, ...

**Two clock cycles per value.** Each LFSR moves one step every second rising
edge of its own clock (`STEP_DIV = 2`). A maximal LFSR therefore repeats after
255 × 2 = 510 cycles. This rate matches the reference behaviour the design
reproduces. Set `STEP_DIV = 1` for one step per edge.

`reset` is asynchronous and active high, and loads `SEED`. The first step
comes on the second rising edge after reset is released.

## Combining by clock XOR: cases 1 to 3 (`combo_prg`)

```
 lfsr_clk[0] ──► lfsr8 (lp) ──┐
 lfsr_clk[1] ──► lfsr8 (lq) ──┼──► lop_select ──► lopresult
 lfsr_clk[2] ──► lfsr8 (lr) ──┘        ▲
 lfsr_clk[*] ──► opclk_xor ── opclk ───┘
```

`opclk_xor` combines the LFSR clocks into one selection clock, `opclk`, by
XOR. On every rising edge of `opclk`, `lop_select` copies one LFSR into
`lopresult`, taking them in turn: lp first after reset, then lq, then lr,
then lp again. The value taken is the one the LFSR held just before that
edge.

How the cases behave:

* **Case 1: all clocks equal.** The XOR of three copies of the same clock is
  that clock, so a new value appears every cycle. The LFSRs only move every
  second cycle, so each LFSR is read twice in every three of its values and
  one value in three is skipped. After reset the output is
  F0 0F C2 78 CA 61 1E 65 5F 0F …, and it repeats after 510 cycles.
* **Cases 2 and 3: different clocks.** `opclk` rises far more often than any
  single LFSR steps, so the same LFSR value is often read twice in a row
  (repeats). The combined pattern repeats only after the least common
  multiple of the clock periods.

**Clock-domain caution.** `opclk` is built from the LFSR clocks. In cases 2
and 3 its rising edges coincide with edges of the very LFSR clocks whose
registers it samples. Nothing synchronises the crossing. The RTL reproduces
that structure faithfully, and in simulation the sample is the pre-edge
value. In silicon, whether the old or the new value is captured depends on
the XOR delay against the LFSR clock-to-output delay. Treat cases 2 and 3 as
an exploration of the idea, not as timing-clean logic. A clock made by XOR
also needs special handling in an FPGA flow.

## XOR of two LFSRs: case 4 (`xor_combo_prg`)

Two clocks of the same frequency and phase would XOR to a constant, so case
4 has no `opclk`. Instead, a register samples lp XOR lq on every clock edge,
so the output follows the LFSRs one cycle later.

The reference output sequence, FF E3 DB AB 4B FA 85 …, is lp XOR lq with its
bit order reversed. `REVERSE_OUT = 1` (the default) reproduces it;
`REVERSE_OUT = 0` gives the plain XOR.

Each output value lasts two cycles, and the sequence repeats after 510
cycles. Two different LFSR states can XOR to the same word, so some
addresses repeat within a period and others never appear.

`ALTERNATE = 1` builds the remedy proposed for this. The register takes lp
and lq in turn, one per clock edge, starting with lp after reset. Over 510
cycles each LFSR then delivers each of its 255 non-zero values exactly once.
The XOR form stays the default.

## Stego datapath (`stego_ctrl`, `stego_embed`, `stego_extract`, `stego_ram`)

**The pixel rule.** Embedding rewrites an 8-bit pixel p as

```
stego = { p[7:2], p[7]^p[6]^p[5]^p[4], secret }
```

This is 1-bit LSB substitution, plus an integrity bit in bit 1 that depends
only on the untouched upper bits. Extraction returns bit 0. It reports
`integrity_ok` when bit 1 still equals the parity of bits 7..4, so changing
an odd number of the bits 7..4 and 1 is detected.

**The controller.** `stego_ctrl` applies this rule to the pixel at a
generator-supplied address, by a read-modify-write of a 256 × 8
single-port RAM:

```
 cycle 0   start=1  (prg_addr, op, secret_bit captured)   IDLE  -> READ
 cycle 1            RAM read of addr_used                  READ  -> APPLY
 cycle 2            EMBED: write modified pixel;
                    EXTRACT: latch rd_bit, integrity_ok     APPLY -> IDLE
 cycle 3   done=1 (one cycle), result valid
```

`busy` is high in READ and APPLY. While the controller is idle, a host port
(`host_we`, `host_addr`, `host_wdata`, `host_rdata`) reads and writes the RAM
directly: load a cover image, read back the stego image. `host_rdata` is
valid one cycle after the address. Host accesses made while busy are
ignored. Assertions check that `done` is a single-cycle pulse that always
follows APPLY.

**Choosing the address.** In `ssst_top`, `addr_sel` picks the address
source: 0 takes case 1 and 1 takes case 4, the two generators that share
`clk` with the datapath. Extraction finds the same pixels as embedding when
you reset the design and replay the same start schedule, because the
generators restart from their seeds.

## Top level (`ssst_top`)

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | 50 MHz clock: cases 1 and 4 and the stego datapath |
| `reset` | in | 1 | asynchronous, active high |
| `p_clk`, `q_clk`, `r_clk` | in | 1 | clocks for cases 2 and 3 (52.38, 73.33, 22.9 MHz), from an external PLL |
| `c1_lop` … `c4_lop` | out | 8 | generator outputs |
| `c1_valid` … `c4_valid` | out | 1 | output has been loaded since reset |
| `c2_opclk`, `c3_opclk` | out | 1 | selection clocks of cases 2 and 3 |
| `addr_sel` | in | 1 | 0: case 1 addresses the RAM, 1: case 4 |
| `stego_start`, `stego_op`, `secret_bit` | in | 1 | operation request (`OP_EMBED` / `OP_EXTRACT`) |
| `stego_busy`, `stego_done`, `stego_addr`, `rd_bit`, `integrity_ok` | out | 1,1,8,1,1 | status and result |
| `host_we`, `host_addr`, `host_wdata`, `host_rdata` | in/in/in/out | 1,8,8,8 | host RAM port |

The PLL that makes `p_clk`, `q_clk` and `r_clk` is vendor clock-synthesis IP
and is not part of the RTL. `tb/pll_model.sv` stands in for it in
simulation.

Shared constants (feedback masks, seeds) and helper functions
(`lfsr_next`, `bit_reverse`, `integrity_bit`) are in `rtl/ssst_pkg.sv`.

## Seed choice and sequence distribution

A good address generator for memory test should visit all regions of the
memory early. The distribution testbench measures this for the (8,6,5,4)
LFSR stepping once per cycle. It counts how many values fall into each
quarter (0-63, …, 192-255) during each 64-cycle window, and likewise for
eighths over 32-cycle windows. The seed counts as the first value.

| Seed | cycles 0-63 | 64-127 | 128-191 | 192-255 |
|------|-------------|--------|---------|---------|
| 11110000 | 18 18 17 11 | 20 13 14 17 | 11 18 17 18 | 14 15 16 19 |
| 11111111 | 12 17 17 18 | 13 18 17 16 | 24 14 14 12 | 14 15 16 19 |

Two results:

* With seed 11110000, no value below 32 appears during cycles 160-191.
* With seed 11111111, one cell reaches 24 (values 0-63 during cycles
  128-191), the least even cell of the table.

The published results of the same analysis agree in shape but not in every
count. For example, the reference reports 23 where this LFSR gives 24, and
lists per-range counts such as (17, 17, 15, 15) where these tables give
(17, 18, 14, 15). The reference also names seed 11111111 as the most even
over eight ranges, but in this model it leaves range 0-31 empty during
cycles 0-31. Exactly how the reference counted its windows is unknown, so
these counts should be taken as this LFSR's, not as a reproduction.

## Simulation

Each testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. Build any of them with Verilator 5, for
example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ssst_pkg.sv tb/tb_ssst_top.sv \
          --top-module tb_ssst_top -y rtl -y tb +libext+.sv
./obj_dir/Vtb_ssst_top
```

| Testbench | What it covers |
|-----------|----------------|
| `tb_lfsr8` | stage equations written bit by bit; reference start values; two-cycle hold; period 255 / 510 |
| `tb_opclk_xor` | XOR for 2 and 3 clocks |
| `tb_lop_select` | round-robin order for 3 and 2 inputs; hold between edges |
| `tb_combo_prg` | cases 1-3 against a reference model (`tb/combo_ref.sv`); case 1 start sequence and 510-cycle period; skips in case 1; repeats in cases 2 and 3 |
| `tb_xor_combo_prg` | case 4 start sequence, one-cycle lag, 510-cycle period, plain-XOR option, alternating option covers all values |
| `tb_stego_embed`, `tb_stego_extract` | all 256 pixels |
| `tb_stego_ram` | random traffic against an array model; read-first |
| `tb_stego_ctrl` | 400 random embeds and extracts; 3-cycle latency; tamper detection; host writes blocked while busy |
| `tb_ssst_top` | all four generators against models, then a 96-bit message embedded at case 4 and case 1 addresses, extracted after reset, tamper detected; counts every mechanism |
| `tb_seq_distribution` | distribution tables for five seeds |

`tb_ssst_top` runs the top at its default (and only) sizes in well under a
second.

## Where this design makes its own choices

* **Reset.** Asynchronous, active high. The RTL starts stepping on the
  second edge after release. The `lop_valid` flags replace an undriven
  output.
* **Two-cycle step.** Made with a small divide counter per LFSR.
* **Case 4 bit order.** The output is bit-reversed to match the reference
  values. A plain XOR is one parameter away.
* **Stego datapath.** Several pieces are not given by the reference and are
  this design's own: the RAM size (256 × 8, one pixel per 8-bit address);
  the read-modify-write controller, its 3-cycle timing and the host port;
  which generators may supply addresses; and the extraction check.
* **Resources differ from the reference.** The reference implementation
  reported 46, 51, 37 and 33 registers for cases 1-4. After generic
  synthesis this RTL has 38 flip-flops in a three-LFSR generator and 27 in
  case 4. The reference's exact register set is unknown.
* **Remedy not built.** For case 1, the reference suggests clocking the
  selector slightly faster than the LFSRs to avoid the skipped values. That
  needs a selection clock of its own and is not built here.
