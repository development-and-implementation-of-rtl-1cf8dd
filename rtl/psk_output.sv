// psk_output: output stage of the PSK modulator.
//
// In QPSK mode the I-channel product (data x cosine) and the Q-channel
// product (data x sine) are added, which gives a carrier at one of four
// phases, 90 degrees apart.  In BPSK mode only the I-channel product is sent:
// the cosine carrier at 0 or 180 degrees.  The sum is one bit wider than the
// products, so it never overflows.
//
// Interface and timing: the selected value is registered; psk_out follows
// the inputs by one clock cycle.  rst_n (asynchronous, active low) clears it.
//
// The adder of the two channels and the BPSK/QPSK selection by control
// bit 1 follow the design; the output register is this implementation's
// choice.
module psk_output
  import psk_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     qpsk,     // 1: QPSK (I + Q), 0: BPSK (I only)
  input  prod_t    i_prod,
  input  prod_t    q_prod,
  output psk_out_t psk_out
);

  psk_out_t sum;

  always_comb sum = qpsk ? (OUT_W'(i_prod) + OUT_W'(q_prod)) : OUT_W'(i_prod);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) psk_out <= '0;
    else        psk_out <= sum;
  end

endmodule
