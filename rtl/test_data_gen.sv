// test_data_gen: internal test data source of the PSK modulator.
//
// A Fibonacci linear feedback shift register produces a pseudo-noise (PN) bit
// stream, one bit per shift.  The output bit is state[0]; the new bit shifted
// in at the top is the XOR of the state bits selected by TAP_MASK.  With the
// default 9-bit register and taps on bits 0 and 4 the stream obeys
//   a[n+9] = a[n] XOR a[n+4]
// which is a maximal-length sequence of period 511.
//
// The generator also plays the role of the bit splitter of a QPSK modulator:
// in QPSK mode each symbol takes two consecutive PN bits, the first (odd
// numbered) one for the I channel and the second (even numbered) one for the
// Q channel, and the register advances by two bits per symbol.  In BPSK mode
// a symbol takes one bit, presented on bit_i (bit_q repeats it), and the
// register advances by one bit.
//
// Interface and timing: bit_i / bit_q show the bits of the current symbol
// combinationally from the register.  When adv is high at a rising clock
// edge the register steps to the next symbol.  rst_n (asynchronous, active
// low) loads SEED.
//
// A PN sequence generator as data source follows the modulator models of the
// design; register length, taps, seed and the splitting of bits into I and Q
// inside this block are this implementation's choices.
module test_data_gen #(
  parameter int unsigned     LFSR_W   = 9,
  parameter logic [LFSR_W-1:0] TAP_MASK = 9'b0_0001_0001,
  parameter logic [LFSR_W-1:0] SEED     = '1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic adv,    // step to the next symbol at this edge
  input  logic qpsk,   // 1: two bits per symbol, 0: one bit per symbol
  output logic bit_i,
  output logic bit_q
);

  logic [LFSR_W-1:0] state;
  logic [LFSR_W-1:0] step1, step2;

  function automatic logic [LFSR_W-1:0] lfsr_step(input logic [LFSR_W-1:0] s);
    return {^(s & TAP_MASK), s[LFSR_W-1:1]};
  endfunction

  assign step1 = lfsr_step(state);
  assign step2 = lfsr_step(step1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   state <= SEED;
    else if (adv) state <= qpsk ? step2 : step1;
  end

  assign bit_i = state[0];
  assign bit_q = qpsk ? step1[0] : state[0];

  initial assert (SEED != '0) else $error("test_data_gen: an all-zero seed locks the LFSR");

endmodule
