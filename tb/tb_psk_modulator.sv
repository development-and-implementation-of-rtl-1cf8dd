// tb_psk_modulator: end-to-end test of the BPSK/QPSK modulator at its
// default parameters (16-bit phase, 64-word quarter table, tuning word 1024,
// i.e. 64 samples per carrier period, 2 periods = 128 samples per symbol).
//
// The test runs the core through these phases of symbols:
//   A  internal data, BPSK, differential encoding on   (control = 3'b101)
//   B  internal data, QPSK, differential encoding off  (control = 3'b011)
//   C  external random data, BPSK, encoding off        (control = 3'b000)
//   D  external random data, QPSK, encoding on         (control = 3'b110)
//   E  a random control word and random external bits, changed at random
//      clocks, also in the middle of symbols
// An independent reference builds the symbol stream: the PN bits from the
// recurrence a[n+9] = a[n] ^ a[n+4] (seed of nine ones), the control word and
// external bits as they were at each symbol boundary, the differential rule
// d[k] = b[k] ^ d[k-1], and +1/-1 levels; the carrier from real-valued
// sin/cos of the sample's phase index.  Every output sample, both channel
// products, data_take, sym_start and out_valid are compared clock by clock.
// Each mechanism (internal/external data, BPSK/QPSK, encoding on/off, mode
// switch, BPSK phase reversal, all four QPSK phases, a control change inside
// a symbol) is counted and must occur.
module tb_psk_modulator;
  import psk_pkg::*;

  localparam int  PHASE_W = 16;
  localparam int  FTW     = 1024;
  localparam int  CPS     = 2;
  localparam int  SPS     = CPS * (2 ** PHASE_W) / FTW;   // samples per symbol
  localparam int  NSYM    = 260;
  localparam real PI      = 3.14159265358979323846;

  logic     clk = 0, rst_n = 0;
  ctrl_t    control;
  logic     ext_i, ext_q;
  logic     data_take, out_valid, sym_start;
  prod_t    i_mod, q_mod;
  psk_out_t psk_out;

  int checks = 0, failures = 0;

  psk_modulator dut (
    .clk(clk), .rst_n(rst_n), .control(control), .ext_i(ext_i), .ext_q(ext_q),
    .data_take(data_take), .i_mod(i_mod), .q_mod(q_mod), .psk_out(psk_out),
    .out_valid(out_valid), .sym_start(sym_start));

  always #5 clk = ~clk;

  initial begin
    repeat (NSYM * SPS + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference symbol stream
  bit pn [4000];
  bit t_i [NSYM + 2], t_q [NSYM + 2], t_mode [NSYM + 2];
  bit s_int [NSYM + 2], s_diff [NSYM + 2];

  // mechanism counters
  int n_int, n_ext, n_bpsk, n_qpsk, n_diff_on, n_diff_off;
  int n_mode_switch, n_reversal, n_mid_change;
  bit seen_phase [4];

  function automatic int qround(real x);
    return (x >= 0.0) ? $rtoi(x + 0.5) : -$rtoi(-x + 0.5);
  endfunction

  function automatic int cos_ref(int j);
    int idx = ((j * FTW) % (2 ** PHASE_W)) >> (PHASE_W - 8);
    return qround(255.0 * $cos(2.0 * PI * (real'(idx) + 0.5) / 256.0));
  endfunction

  function automatic int sin_ref(int j);
    int idx = ((j * FTW) % (2 ** PHASE_W)) >> (PHASE_W - 8);
    return qround(255.0 * $sin(2.0 * PI * (real'(idx) + 0.5) / 256.0));
  endfunction

  function automatic int lvl(bit b);
    return b ? 1 : -1;
  endfunction

  task automatic check(string what, int got, int expected, int at);
    checks++;
    if (got != expected) begin
      failures++;
      if (failures < 20) $display("clock %0d: %s = %0d, expected %0d", at, what, got, expected);
    end
  endtask

  // control word for a symbol in the fixed phases
  function automatic ctrl_t phase_ctrl(int k);
    if (k < 50)       return 3'b101;
    else if (k < 100) return 3'b011;
    else if (k < 140) return 3'b000;
    else              return 3'b110;
  endfunction

  initial begin
    int e, ptr, k_next;
    for (int n = 0; n < 9; n++) pn[n] = 1;
    for (int n = 9; n < 4000; n++) pn[n] = pn[n-9] ^ pn[n-5];

    control = 3'b101; ext_i = 0; ext_q = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    e = 0; ptr = 0; k_next = 1;

    forever begin
      @(posedge clk);
      e++;
      // ---- reference update at this edge (inputs are stable here)
      if (e == 1) begin
        t_i[0] = 0; t_q[0] = 0; t_mode[0] = control.qpsk;
        s_int[0] = control.internal; s_diff[0] = control.diff_on;
      end
      if (e > 1 && (e - 1) % SPS == 0) begin
        automatic bit bi, bq;
        automatic int k = k_next;
        if (control.internal) begin
          bi = pn[ptr];
          bq = control.qpsk ? pn[ptr + 1] : pn[ptr];
          ptr += control.qpsk ? 2 : 1;
        end else begin
          bi = ext_i;
          bq = ext_q;
        end
        t_i[k]    = control.diff_on ? (bi ^ t_i[k-1]) : bi;
        t_q[k]    = control.diff_on ? (bq ^ t_q[k-1]) : bq;
        t_mode[k] = control.qpsk;
        s_int[k]  = control.internal;
        s_diff[k] = control.diff_on;
        if (control.internal) n_int++; else n_ext++;
        if (control.diff_on) n_diff_on++; else n_diff_off++;
        if (control.qpsk) begin
          n_qpsk++;
          seen_phase[{t_i[k], t_q[k]}] = 1;
        end else begin
          n_bpsk++;
          if (!t_mode[k-1] && t_i[k] != t_i[k-1]) n_reversal++;
        end
        if (t_mode[k] != t_mode[k-1]) n_mode_switch++;
        k_next++;
      end

      @(negedge clk);
      // ---- outputs after edge e
      if (e >= 3) begin
        automatic int j = e - 3;
        automatic int k = j / SPS;
        automatic int exp_out = lvl(t_i[k]) * cos_ref(j) + (t_mode[k] ? lvl(t_q[k]) * sin_ref(j) : 0);
        check("psk_out", int'(psk_out), exp_out, e);
        check("sym_start", int'(sym_start), int'(j % SPS == 0), e);
      end
      if (e >= 2) begin
        automatic int j = e - 2;
        automatic int k = j / SPS;
        check("i_mod", int'(i_mod), lvl(t_i[k]) * cos_ref(j), e);
        check("q_mod", int'(q_mod), lvl(t_q[k]) * sin_ref(j), e);
      end
      check("out_valid", int'(out_valid), int'(e >= 3), e);
      check("data_take", int'(data_take), int'(e + 1 > 1 && e % SPS == 0), e);

      if (k_next >= NSYM) break;

      // ---- drive inputs for the next edge
      if (k_next < 200) begin
        if (e % SPS == SPS / 2) begin
          control = phase_ctrl(k_next);
          ext_i = 1'($urandom_range(0, 1));
          ext_q = 1'($urandom_range(0, 1));
        end
      end else if ($urandom_range(0, 99) < 2) begin
        ctrl_t c;
        c = ctrl_t'($urandom_range(0, 7));
        if (c != control && e % SPS != 0) n_mid_change++;
        control = c;
        ext_i = 1'($urandom_range(0, 1));
        ext_q = 1'($urandom_range(0, 1));
      end
    end

    $display("symbols %0d: internal %0d external %0d, BPSK %0d QPSK %0d, encoding on %0d off %0d",
             k_next, n_int, n_ext, n_bpsk, n_qpsk, n_diff_on, n_diff_off);
    $display("mode switches %0d, BPSK phase reversals %0d, control changes inside a symbol %0d",
             n_mode_switch, n_reversal, n_mid_change);
    check("internal-data symbols seen", int'(n_int > 0), 1, e);
    check("external-data symbols seen", int'(n_ext > 0), 1, e);
    check("BPSK symbols seen", int'(n_bpsk > 0), 1, e);
    check("QPSK symbols seen", int'(n_qpsk > 0), 1, e);
    check("encoded symbols seen", int'(n_diff_on > 0), 1, e);
    check("unencoded symbols seen", int'(n_diff_off > 0), 1, e);
    check("mode switches seen", int'(n_mode_switch > 0), 1, e);
    check("BPSK phase reversals seen", int'(n_reversal > 0), 1, e);
    check("control changes inside a symbol", int'(n_mid_change > 0), 1, e);
    for (int p = 0; p < 4; p++) check("QPSK phase seen", int'(seen_phase[p]), 1, p);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
