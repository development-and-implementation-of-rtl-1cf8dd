// nco: numerically controlled oscillator giving sine and cosine carriers.
//
// A PHASE_W-bit phase accumulator adds the frequency tuning word ftw every
// clock, so the carrier frequency is f_clk * ftw / 2**PHASE_W.  The top
// LUT_AW+2 bits of the phase form a sample index: its two upper bits select
// the quadrant and the remaining LUT_AW bits address a quarter-wave sine
// table of 2**LUT_AW nine-bit words (0 to 90 degrees).  Quadrants 1 and 3
// read the table with the address inverted; quadrants 2 and 3 negate the
// word.  The cosine is the sine of the phase advanced by one quadrant, so
// both carriers come from the same table through its two read ports.
//
// With an index i = phase >> (PHASE_W - LUT_AW - 2) and N = 4 * 2**LUT_AW:
//   sin_o = round(AMPL * sin(2*pi*(i + 0.5) / N))
//   cos_o = round(AMPL * cos(2*pi*(i + 0.5) / N))
//
// Interface and timing: sin_o, cos_o and cycle_end_o belong to the phase the
// accumulator held one clock earlier (latency 1).  cycle_end_o is high with
// the last sample of each carrier period (the accumulator wraps after it).
// After rst_n (asynchronous, active low) the phase is 0, so the first sample
// is the start of a carrier period.
//
// An NCO that serves sine and cosine from one 0-90 degree table of 9-bit
// values is the design's; the accumulator and table sizes, the half-step
// sampling of the table and the default amplitude of 255 (so that the
// negated value still fits a 9-bit signed sample) are this implementation's
// choices.
module nco
  import psk_pkg::*;
#(
  parameter int unsigned PHASE_W = 16,
  parameter int unsigned LUT_AW  = 6,
  parameter int unsigned AMPL    = 2 ** (CARRIER_W - 1) - 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PHASE_W-1:0] ftw,
  output carrier_t           sin_o,
  output carrier_t           cos_o,
  output logic               cycle_end_o
);

  localparam int unsigned IDX_W = LUT_AW + 2;

  logic [PHASE_W-1:0] phase;
  logic [PHASE_W:0]   phase_sum;
  logic [IDX_W-1:0]   idx_s, idx_c;
  logic [LUT_AW-1:0]  addr_s, addr_c;
  logic               neg_s_q, neg_c_q;
  logic [CARRIER_W-1:0] mag_s, mag_c;

  always_comb begin
    phase_sum = {1'b0, phase} + {1'b0, ftw};
    idx_s     = phase[PHASE_W-1 -: IDX_W];
    idx_c     = idx_s + IDX_W'(2 ** LUT_AW);     // +90 degrees
    addr_s    = idx_s[LUT_AW] ? ~idx_s[LUT_AW-1:0] : idx_s[LUT_AW-1:0];
    addr_c    = idx_c[LUT_AW] ? ~idx_c[LUT_AW-1:0] : idx_c[LUT_AW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase       <= '0;
      neg_s_q     <= 1'b0;
      neg_c_q     <= 1'b0;
      cycle_end_o <= 1'b0;
    end else begin
      phase       <= phase_sum[PHASE_W-1:0];
      neg_s_q     <= idx_s[IDX_W-1];
      neg_c_q     <= idx_c[IDX_W-1];
      cycle_end_o <= phase_sum[PHASE_W];
    end
  end

  quarter_sine_rom #(
    .AW   (LUT_AW),
    .W    (CARRIER_W),
    .AMPL (AMPL)
  ) u_rom (
    .clk    (clk),
    .addr_a (addr_s),
    .addr_b (addr_c),
    .data_a (mag_s),
    .data_b (mag_c)
  );

  always_comb begin
    sin_o = neg_s_q ? -carrier_t'(mag_s) : carrier_t'(mag_s);
    cos_o = neg_c_q ? -carrier_t'(mag_c) : carrier_t'(mag_c);
  end

  initial assert (PHASE_W >= IDX_W) else $error("nco: PHASE_W must be at least LUT_AW + 2");
  initial assert (AMPL < 2 ** (CARRIER_W - 1)) else $error("nco: AMPL does not fit a signed carrier sample");

endmodule
