// unipolar_to_polar: unipolar NRZ bit to polar NRZ level.
//
// A data bit 1 becomes the level +1 and a bit 0 the level -1, both as 2-bit
// two's complement numbers (01 and 11), ready to be multiplied with the
// carrier: a 1 then sends the carrier at 0 degrees and a 0 at 180 degrees.
// Purely combinational; no clock.
//
// The mapping 1 -> +1, 0 -> -1 is the design's; the 2-bit signed encoding
// is implied by its 2 x 9 multiplier.
module unipolar_to_polar
  import psk_pkg::*;
(
  input  logic   bit_in,
  output polar_t level
);

  localparam polar_t POLAR_POS = 2'sb01;  // +1 for logic 1
  localparam polar_t POLAR_NEG = 2'sb11;  // -1 for logic 0

  always_comb level = bit_in ? POLAR_POS : POLAR_NEG;

endmodule
