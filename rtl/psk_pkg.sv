// psk_pkg: types and constants shared by the BPSK/QPSK modulator blocks.
//
// The 3-bit control word of the modulator is declared as a packed struct whose
// bit positions follow the control table of the design:
//   control[0] = 0 external data,      1 internal test data
//   control[1] = 0 BPSK modulation,    1 QPSK modulation
//   control[2] = 0 differential coding off, 1 on
// The carrier samples are 9-bit signed numbers (the "9" of the 2 x 9
// multiplier) and the polar data symbols are 2-bit signed numbers (+1 / -1).
// The product and output widths follow from these two widths.
package psk_pkg;

  typedef struct packed {
    logic diff_on;   // control[2]
    logic qpsk;      // control[1]
    logic internal;  // control[0]
  } ctrl_t;

  localparam int unsigned POLAR_W   = 2;                   // polar data width
  localparam int unsigned CARRIER_W = 9;                   // carrier sample width
  localparam int unsigned PROD_W    = POLAR_W + CARRIER_W; // full signed product
  localparam int unsigned OUT_W     = PROD_W + 1;          // I + Q sum

  typedef logic signed [POLAR_W-1:0]   polar_t;
  typedef logic signed [CARRIER_W-1:0] carrier_t;
  typedef logic signed [PROD_W-1:0]    prod_t;
  typedef logic signed [OUT_W-1:0]     psk_out_t;

endpackage
