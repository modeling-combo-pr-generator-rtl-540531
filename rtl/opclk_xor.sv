// opclk_xor: output-selection clock of the combo PR generator.
//
// opclk is the XOR of the N LFSR clocks, as drawn for two clocks (p, q) and
// three clocks (p, q, r). With identical input clocks an odd count gives the
// same clock back and an even count gives a constant level; with clocks of
// different frequencies opclk has a rising edge at many (not all) of the
// input edges and its pattern repeats with the common period of the inputs.
// Purely combinational.
module opclk_xor #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] clk_in,
  output logic         opclk
);
  assign opclk = ^clk_in;
endmodule
