// quarter_sine_rom: one quarter of a sine wave, read through two ports.
//
// Holds DEPTH = 2**AW words of W bits with
//   rom[k] = round(AMPL * sin((k + 0.5) * (pi/2) / DEPTH)),  k = 0 .. DEPTH-1,
// i.e. the sine over 0 to 90 degrees sampled at the middle of each of DEPTH
// equal phase steps.  Sampling at the half step makes the table exactly
// mirror-symmetric across the quadrants: the second quadrant is read with
// the address inverted, and the lower half-wave is the negated upper one.
// The table is computed at elaboration time from the formula above.
//
// Two independent read ports share the one table, so a sine and a cosine can
// be read in the same cycle.  Both read ports are synchronous: data appears
// one clock after the address.
module quarter_sine_rom #(
  parameter int unsigned AW   = 6,
  parameter int unsigned W    = 9,
  parameter int unsigned AMPL = 255
) (
  input  logic          clk,
  input  logic [AW-1:0] addr_a,
  input  logic [AW-1:0] addr_b,
  output logic [W-1:0]  data_a,
  output logic [W-1:0]  data_b
);

  localparam int unsigned DEPTH = 2 ** AW;
  localparam real PI = 3.14159265358979323846;

  typedef logic [W-1:0] table_t [DEPTH];

  function automatic table_t build_table();
    table_t t;
    for (int k = 0; k < DEPTH; k++)
      t[k] = W'($rtoi(real'(AMPL) * $sin((real'(k) + 0.5) * PI / (2.0 * real'(DEPTH))) + 0.5));
    return t;
  endfunction

  // One array with two read ports, filled at start-up from the formula.
  table_t rom;
  initial rom = build_table();

  always_ff @(posedge clk) begin
    data_a <= rom[addr_a];
    data_b <= rom[addr_b];
  end

endmodule
