// ssst_pkg: constants and small helper functions shared by the combo
// pseudo-random (PR) generators and the stego datapath.
//
// The two 8-bit LFSRs are right-shifting Galois registers: stage ln(0) is
// the output, it is fed back into ln(7) and XORed into three inner stages.
// A feedback mask holds a 1 at every stage that receives ln(0):
//   (8,6,5,4), P8(x) = 1 + x^4 + x^5 + x^6 + x^8 : XOR into ln(3), ln(2), ln(1)
//   (8,4,3,2)                                    : XOR into ln(5), ln(4), ln(3)
// The masks follow the two LFSR structure drawings and reproduce the
// published waveform values (F0->78->3C, 0F->89->CA, 0F->BF->E7).
package ssst_pkg;

  localparam int unsigned LFSR_W = 8;

  typedef logic [LFSR_W-1:0] lfsr_t;

  // Feedback masks (bit i set: ln(i) gets the feedback bit).
  localparam lfsr_t FB_8654 = 8'h8E;
  localparam lfsr_t FB_8432 = 8'hB8;

  // Seeds used by the four generator cases.
  localparam lfsr_t SEED_P = 8'hF0;
  localparam lfsr_t SEED_Q = 8'h0F;
  localparam lfsr_t SEED_R = 8'h99;

  // One LFSR step.
  function automatic lfsr_t lfsr_next(lfsr_t s, lfsr_t fb_mask);
    return (s >> 1) ^ (s[0] ? fb_mask : '0);
  endfunction

  // Reverse the bit order of an 8-bit word.
  function automatic lfsr_t bit_reverse(lfsr_t v);
    lfsr_t r;
    for (int i = 0; i < LFSR_W; i++) r[i] = v[LFSR_W-1-i];
    return r;
  endfunction

  // Stego pixel operations.
  typedef logic [7:0] pixel_t;

  // Integrity bit: XOR of the four most significant pixel bits (pass p[7:4]).
  function automatic logic integrity_bit(logic [3:0] msb);
    return ^msb;
  endfunction

  // Operation requested from the stego controller.
  typedef enum logic {OP_EMBED = 1'b0, OP_EXTRACT = 1'b1} stego_op_e;

endpackage
