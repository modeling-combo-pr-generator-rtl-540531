// stego_extract: recovers the secret bit from a stego pixel and checks it.
//
// The secret bit is bit 0. The pixel passes the integrity check when bit 1
// equals the XOR of bits 7..4, the rule stego_embed writes; a pixel whose
// upper bits or integrity bit were altered after embedding fails it (an odd
// number of flips among bits 7..4 and 1 is detected). Purely combinational.
//
// Ports: stego (pixel read from memory), secret (recovered bit),
// integrity_ok (check result).
module stego_extract
  import ssst_pkg::*;
(
  input  pixel_t stego,
  output logic   secret,
  output logic   integrity_ok
);
  assign secret       = stego[0];
  assign integrity_ok = (stego[1] == integrity_bit(stego[7:4]));
endmodule
