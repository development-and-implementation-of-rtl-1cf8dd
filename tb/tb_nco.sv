// tb_nco: checks the numerically controlled oscillator.
// The test keeps its own phase accumulator and, for each clock, computes the
// expected sine and cosine from the phase index i (top 8 bits) as
//   round(255 * sin(2*pi*(i + 0.5) / 256)), round(255 * cos(...))
// with real arithmetic (rounding half away from zero), one clock after the
// phase.  It also checks the end-of-period flag.  The tuning word is first
// the default 1024 (64 samples per period), then 4096, then random values.
// Finally it checks that every sample is within one step of the ideal
// sinusoid and that both carriers reach +/-255.
module tb_nco;
  import psk_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic        clk = 0, rst_n = 0;
  logic [15:0] ftw;
  carrier_t    sin_o, cos_o;
  logic        cycle_end_o;
  int          checks = 0, failures = 0;
  int          n_wraps = 0, max_sin = -1000, min_sin = 1000, max_cos = -1000, min_cos = 1000;

  nco dut (.clk(clk), .rst_n(rst_n), .ftw(ftw), .sin_o(sin_o), .cos_o(cos_o),
           .cycle_end_o(cycle_end_o));

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int qround(real x);
    return (x >= 0.0) ? $rtoi(x + 0.5) : -$rtoi(-x + 0.5);
  endfunction

  function automatic real rabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  initial begin
    int ph, ph_prev, ftw_prev;
    ftw = 16'd1024;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    ph = 0;
    for (int n = 0; n < 20000; n++) begin
      int idx, es, ec;
      real ang;
      @(posedge clk);
      ph_prev  = ph;
      ftw_prev = int'(ftw);
      ph = (ph + ftw_prev) % 65536;
      @(negedge clk);
      idx = ph_prev >> 8;
      ang = 2.0 * PI * (real'(idx) + 0.5) / 256.0;
      es  = qround(255.0 * $sin(ang));
      ec  = qround(255.0 * $cos(ang));
      checks++;
      if (int'(sin_o) != es || int'(cos_o) != ec) begin
        failures++;
        if (failures < 10) $display("phase %0d: sin %0d cos %0d, expected %0d %0d", ph_prev, sin_o, cos_o, es, ec);
      end
      checks++;
      if (cycle_end_o != (ph_prev + ftw_prev >= 65536)) begin
        failures++;
        if (failures < 10) $display("phase %0d: cycle_end %b wrong", ph_prev, cycle_end_o);
      end
      if (cycle_end_o) n_wraps++;
      // closeness to the ideal sinusoid at the sample's own phase
      checks++;
      if (rabs(real'(sin_o) - 255.0 * $sin(2.0 * PI * real'(ph_prev) / 65536.0)) > 255.0 * 2.0 * PI / 256.0 + 1.0)
        failures++;
      if (int'(sin_o) > max_sin) max_sin = int'(sin_o);
      if (int'(sin_o) < min_sin) min_sin = int'(sin_o);
      if (int'(cos_o) > max_cos) max_cos = int'(cos_o);
      if (int'(cos_o) < min_cos) min_cos = int'(cos_o);
      if (n == 5000)       ftw = 16'd4096;
      else if (n >= 10000) ftw = 16'($urandom_range(1, 65535));
    end
    checks++;
    if (max_sin != 255 || min_sin != -255 || max_cos != 255 || min_cos != -255) begin
      failures++;
      $display("amplitude %0d..%0d / %0d..%0d", min_sin, max_sin, min_cos, max_cos);
    end
    checks++;
    if (n_wraps < 100) failures++;
    $display("carrier periods %0d", n_wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
