// mult_2x9: signed 2-bit by 9-bit multiplier with a registered product.
//
// Multiplies a polar data level (2-bit two's complement, normally +1 or -1)
// with a carrier sample (9-bit two's complement).  The full 11-bit signed
// product is kept, so every input pair, including -2 x -256, is exact.  The
// product is written with the * operator, as the design does, and left to
// synthesis to map onto the target's multiplier resources.
//
// Interface and timing: a and b are sampled at every rising clock edge and
// p shows their product one cycle later (latency 1, one product per clock).
// rst_n (asynchronous, active low) clears p.
//
// The widths are the design's; the output register is this implementation's
// choice.
module mult_2x9
  import psk_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  polar_t   a,
  input  carrier_t b,
  output prod_t    p
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p <= '0;
    else        p <= PROD_W'(a) * PROD_W'(b);
  end

endmodule
