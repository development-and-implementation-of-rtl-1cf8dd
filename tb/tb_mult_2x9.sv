// tb_mult_2x9: exhaustive test of the signed 2 x 9 multiplier.
// Every pair of a 2-bit and a 9-bit two's complement operand is applied, one
// per clock; the product must appear exactly one clock later and equal the
// integer product.
module tb_mult_2x9;
  import psk_pkg::*;

  logic     clk = 0, rst_n = 0;
  polar_t   a;
  carrier_t b;
  prod_t    p;
  int       checks = 0, failures = 0;

  mult_2x9 dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected_prev;
    bit have_prev;
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    checks++;
    if (p != '0) begin failures++; $display("product not cleared by reset"); end
    @(negedge clk) rst_n = 1;
    have_prev = 0;
    for (int ia = -2; ia <= 1; ia++) begin
      for (int ib = -256; ib <= 255; ib++) begin
        @(negedge clk);
        if (have_prev) begin
          checks++;
          if (int'(p) != expected_prev) begin
            failures++;
            if (failures < 10) $display("product %0d, expected %0d", p, expected_prev);
          end
        end
        a = polar_t'(ia);
        b = carrier_t'(ib);
        expected_prev = ia * ib;
        have_prev = 1;
      end
    end
    @(negedge clk);
    checks++;
    if (int'(p) != expected_prev) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
