// diff_encoder: optional differential encoder for the I and Q bit streams.
//
// Each channel keeps its last encoded bit.  When en is high at a rising clock
// edge the register takes the next symbol:
//   enc_on = 1 : d[k] = b[k] XOR d[k-1]   (a 1 toggles the output, a 0 keeps it)
//   enc_on = 0 : d[k] = b[k]              (pass-through)
// so a receiver recovers b[k] = d[k] XOR d[k-1] from phase changes and does
// not need an absolute carrier phase reference.  The I and Q channels are
// encoded independently of each other.
//
// Interface and timing: one register stage, updated only on en (one pulse per
// symbol); d holds the encoded bits of the symbol being transmitted.  rst_n
// (asynchronous, active low) clears the register, which is also the initial
// reference bit of the encoder.
//
// The existence of the block and its on/off control (control bit 2) follow
// the design; the XOR rule, the per-channel encoding and the zero reference
// after reset are this implementation's choices.
module diff_encoder #(
  parameter int unsigned CH = 2   // number of bit streams (I and Q)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,      // take the next symbol at this edge
  input  logic          enc_on,  // 1: differential encoding, 0: bypass
  input  logic [CH-1:0] b,       // unencoded bits of the next symbol
  output logic [CH-1:0] d        // bits of the current symbol
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  d <= '0;
    else if (en) d <= enc_on ? (b ^ d) : b;
  end

endmodule
