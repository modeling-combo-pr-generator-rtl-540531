// stego_embed: hides one secret bit in an 8-bit cover pixel.
//
// Bit 0 of the pixel is replaced by the secret bit (1-bit LSB substitution)
// and bit 1, the bit next to the LSB, is replaced by the XOR of the four
// most significant bits, an integrity bit the extractor checks. Bits 7..2
// are kept, so the integrity bit is always computed from unchanged bits.
// Purely combinational.
//
// Ports: cover_px (pixel read from memory), secret (bit to hide), stego (pixel
// to write back).
module stego_embed
  import ssst_pkg::*;
(
  input  pixel_t cover_px,
  input  logic   secret,
  output pixel_t stego
);
  assign stego = {cover_px[7:2], integrity_bit(cover_px[7:4]), secret};
endmodule
