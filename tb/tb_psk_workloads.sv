// tb_psk_workloads: the two operating points of the modulator, checked the
// way a receiver would see them.
//   run 1: BPSK, internal PN data, differential encoding on  (control 3'b101)
//   run 2: QPSK, internal PN data, differential encoding off (control 3'b011)
// Each run starts from reset and sends NSYM symbols.  For every symbol the
// output samples are correlated with an ideal cosine and sine of the carrier
// (64 samples per period, 128 per symbol at the default parameters), which
// gives the symbol's constellation point (I, Q) and its phase
// atan2(Q, I).  The test checks:
//   BPSK: Q is near 0 and the phase is 0 or 180 degrees; differentially
//         decoding the sign of I gives back the PN sequence
//         a[n+9] = a[n] ^ a[n+4] (nine ones first).
//   QPSK: the phase is one of 45, 135, 225 or 315 degrees (all four occur);
//         the signs of I and Q give the PN bits in pairs, first bit on I.
// The first symbol after reset carries the bits 0/0 and is only used as the
// reference of the differential decoder.
module tb_psk_workloads;
  import psk_pkg::*;

  localparam int  SPS  = 128;  // samples per symbol at the default parameters
  localparam int  SPC  = 64;   // samples per carrier period
  localparam int  NSYM = 120;
  localparam real PI   = 3.14159265358979323846;

  logic     clk = 0, rst_n = 0;
  ctrl_t    control;
  logic     data_take, out_valid, sym_start;
  prod_t    i_mod, q_mod;
  psk_out_t psk_out;

  int checks = 0, failures = 0;
  bit pn [1000];
  int n_phase [4];

  psk_modulator dut (
    .clk(clk), .rst_n(rst_n), .control(control), .ext_i(1'b0), .ext_q(1'b0),
    .data_take(data_take), .i_mod(i_mod), .q_mod(q_mod), .psk_out(psk_out),
    .out_valid(out_valid), .sym_start(sym_start));

  always #5 clk = ~clk;

  initial begin
    repeat (2 * NSYM * SPS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  task automatic expect_true(string what, bit ok, int sym);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("symbol %0d: %s", sym, what);
    end
  endtask

  // run one configuration; returns the correlations of every symbol
  task automatic run(input ctrl_t c, output real ci [NSYM], output real cq [NSYM]);
    int j;
    control = c;
    rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < NSYM; k++) begin ci[k] = 0.0; cq[k] = 0.0; end
    j = 0;
    while (j < NSYM * SPS) begin
      @(negedge clk);
      if (out_valid) begin
        real th;
        th = 2.0 * PI * (real'(j % SPC) + 0.125) / real'(SPC);
        ci[j / SPS] += real'(psk_out) * $cos(th);
        cq[j / SPS] += real'(psk_out) * $sin(th);
        j++;
      end
    end
  endtask

  initial begin
    real ci [NSYM], cq [NSYM];
    real full;
    full = 255.0 * real'(SPS) / 2.0;   // correlation of a full-scale symbol
    for (int n = 0; n < 9; n++) pn[n] = 1;
    for (int n = 9; n < 1000; n++) pn[n] = pn[n-9] ^ pn[n-5];

    // ---------------- run 1: BPSK, internal data, differential encoding on
    run(3'b101, ci, cq);
    for (int k = 0; k < NSYM; k++) begin
      real ph;
      ph = $atan2(cq[k], ci[k]) * 180.0 / PI;
      expect_true("BPSK amplitude", rabs(rabs(ci[k]) - full) < 0.02 * full, k);
      expect_true("BPSK quadrature component", rabs(cq[k]) < 0.02 * full, k);
      expect_true("BPSK phase 0 or 180 degrees", rabs(ph) < 1.0 || rabs(rabs(ph) - 180.0) < 1.0, k);
      if (k > 0)
        expect_true("BPSK decoded bit", ((ci[k] > 0.0) ^ (ci[k-1] > 0.0)) == pn[k-1], k);
      else
        expect_true("BPSK reference symbol", ci[k] < 0.0, k);
    end

    // ---------------- run 2: QPSK, internal data, differential encoding off
    run(3'b011, ci, cq);
    for (int k = 0; k < NSYM; k++) begin
      real ph;
      int  q;
      ph = $atan2(cq[k], ci[k]) * 180.0 / PI;
      if (ph < 0.0) ph += 360.0;
      q = int'($floor(ph / 90.0));   // 45 -> 0, 135 -> 1, 225 -> 2, 315 -> 3
      if (q > 3) q = 3;
      expect_true("QPSK phase at an odd multiple of 45 degrees", rabs(ph - (90.0 * real'(q) + 45.0)) < 1.0, k);
      expect_true("QPSK amplitude", rabs(rabs(ci[k]) - full) < 0.02 * full && rabs(rabs(cq[k]) - full) < 0.02 * full, k);
      n_phase[q]++;
      if (k > 0) begin
        expect_true("QPSK I bit", (ci[k] > 0.0) == pn[2*(k-1)], k);
        expect_true("QPSK Q bit", (cq[k] > 0.0) == pn[2*(k-1)+1], k);
      end
    end
    for (int q = 0; q < 4; q++) expect_true("QPSK phase never seen", n_phase[q] > 0, q);
    $display("QPSK symbols at 45/135/225/315 degrees: %0d %0d %0d %0d",
             n_phase[0], n_phase[1], n_phase[2], n_phase[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
