// psk_modulator: BPSK / QPSK modulator core.
//
// The core turns a bit stream into a digital carrier whose phase carries the
// data.  A 3-bit control word (see psk_pkg::ctrl_t) chooses
//   control[0]  data source: external inputs (0) or internal PN test data (1)
//   control[1]  BPSK (0): one bit per symbol, cosine carrier at 0 or 180 deg
//               QPSK (1): two bits per symbol, I on the cosine and Q on the
//               sine carrier, summed: carrier at 45, 135, 225 or 315 deg
//   control[2]  differential encoding off (0) or on (1)
//
// Data path, one symbol register stage followed by a sample pipeline:
//   test_data_gen / ext_i,ext_q -> diff_encoder -> unipolar_to_polar
//     -> mult_2x9 (I x cos, Q x sin) -> psk_output (BPSK: I, QPSK: I + Q)
// The nco supplies cosine and sine samples from one quarter-wave table.
//
// Symbol timing: a symbol lasts CYCLES_PER_SYMBOL carrier periods, so the
// carrier frequency is an integer multiple of the symbol rate and every
// symbol starts at carrier phase 0.  The NCO flags the last sample of each
// carrier period; a counter of these marks the last sample of a symbol.  At
// that clock edge (data_take high) the next symbol is loaded: the control
// word is sampled, the internal generator steps, ext_i/ext_q are taken, and
// the encoder register updates.  A control change therefore takes effect at
// the next symbol boundary.
//
// Timing: one output sample per clock.  The sample at phase index j of the
// NCO appears on psk_out three clocks after the accumulator held it; after
// rst_n is released psk_out is valid from the third rising edge on
// (out_valid), and sym_start marks the first sample of every symbol on
// psk_out.  i_mod/q_mod are the channel products one clock ahead of
// psk_out.  The first symbol after reset carries the bits 0/0.
//
// The chain of blocks, the control word, the 9-bit carrier, the 2 x 9
// multiplier, the single sine/cosine table and the integer number of carrier
// periods per symbol follow the design.  Sizes (phase accumulator, table
// depth, tuning word, periods per symbol), symbol-boundary sampling of the
// control word, the pipeline registers and the reset behaviour are this
// implementation's choices.
module psk_modulator
  import psk_pkg::*;
#(
  parameter int unsigned PHASE_W           = 16,
  parameter int unsigned LUT_AW            = 6,
  parameter int unsigned FTW               = 1024,  // 64 samples per carrier period
  parameter int unsigned CYCLES_PER_SYMBOL = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  ctrl_t    control,
  input  logic     ext_i,       // external I (BPSK: the) data bit
  input  logic     ext_q,       // external Q data bit (QPSK only)
  output logic     data_take,   // ext_i/ext_q are taken at this clock edge
  output prod_t    i_mod,       // I-channel product, data x cosine
  output prod_t    q_mod,       // Q-channel product, data x sine
  output psk_out_t psk_out,     // modulated carrier sample
  output logic     out_valid,
  output logic     sym_start    // psk_out holds the first sample of a symbol
);

  localparam int unsigned CNT_W = (CYCLES_PER_SYMBOL > 1) ? $clog2(CYCLES_PER_SYMBOL) : 1;

  // ---------------------------------------------------------------- carrier
  carrier_t sin_s, cos_s;
  logic     cycle_end;

  nco #(
    .PHASE_W (PHASE_W),
    .LUT_AW  (LUT_AW)
  ) u_nco (
    .clk         (clk),
    .rst_n       (rst_n),
    .ftw         (PHASE_W'(FTW)),
    .sin_o       (sin_s),
    .cos_o       (cos_s),
    .cycle_end_o (cycle_end)
  );

  // ---------------------------------------------------------- symbol timing
  logic [CNT_W-1:0] cyc_cnt;
  logic             sym_end;
  logic             started;   // the NCO output holds a real sample

  always_comb sym_end = cycle_end && (cyc_cnt == CNT_W'(CYCLES_PER_SYMBOL - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         cyc_cnt <= '0;
    else if (sym_end)   cyc_cnt <= '0;
    else if (cycle_end) cyc_cnt <= cyc_cnt + 1'b1;
  end

  assign data_take = sym_end;

  // Modulation mode of the symbol being sent; loaded with the symbol's data.
  logic qpsk_sym;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    qpsk_sym <= 1'b0;
    else if (sym_end || !started)  qpsk_sym <= control.qpsk;
  end

  // ------------------------------------------------------------ data source
  logic gen_i, gen_q;

  test_data_gen u_gen (
    .clk   (clk),
    .rst_n (rst_n),
    .adv   (sym_end && control.internal),
    .qpsk  (control.qpsk),
    .bit_i (gen_i),
    .bit_q (gen_q)
  );

  logic [1:0] src_bits, enc_bits;   // [1] = I, [0] = Q
  always_comb src_bits = control.internal ? {gen_i, gen_q} : {ext_i, ext_q};

  diff_encoder #(.CH(2)) u_diff (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (sym_end),
    .enc_on (control.diff_on),
    .b      (src_bits),
    .d      (enc_bits)
  );

  polar_t lvl_i, lvl_q;
  unipolar_to_polar u_pol_i (.bit_in(enc_bits[1]), .level(lvl_i));
  unipolar_to_polar u_pol_q (.bit_in(enc_bits[0]), .level(lvl_q));

  // ------------------------------------------------------------ modulation
  mult_2x9 u_mult_i (.clk(clk), .rst_n(rst_n), .a(lvl_i), .b(cos_s), .p(i_mod));
  mult_2x9 u_mult_q (.clk(clk), .rst_n(rst_n), .a(lvl_q), .b(sin_s), .p(q_mod));

  logic qpsk_d;   // qpsk_sym aligned with the products
  psk_output u_out (
    .clk     (clk),
    .rst_n   (rst_n),
    .qpsk    (qpsk_d),
    .i_prod  (i_mod),
    .q_prod  (q_mod),
    .psk_out (psk_out)
  );

  // ------------------------------------------------- pipeline bookkeeping
  logic first_s;            // first sample of a symbol, at the NCO output
  logic [1:0] valid_pipe, first_pipe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      started    <= 1'b0;
      first_s    <= 1'b0;
      qpsk_d     <= 1'b0;
      valid_pipe <= '0;
      first_pipe <= '0;
    end else begin
      started    <= 1'b1;
      first_s    <= sym_end || !started;
      qpsk_d     <= qpsk_sym;
      valid_pipe <= {valid_pipe[0], started};
      first_pipe <= {first_pipe[0], first_s && started};
    end
  end

  assign out_valid = valid_pipe[1];
  assign sym_start = first_pipe[1];

  initial assert (CYCLES_PER_SYMBOL >= 1) else $error("psk_modulator: CYCLES_PER_SYMBOL must be at least 1");

endmodule
