// tb_diff_encoder: checks the differential encoder on two channels.
// Random bits and a random update enable are applied with encoding switched
// on and off in phases.  A reference keeps the previous encoded bit per
// channel: with encoding on the new bit is b XOR previous, otherwise b.  The
// test also decodes the output (d[k] XOR d[k-1]) and compares it with the
// source bits while encoding is on.
module tb_diff_encoder;

  logic       clk = 0, rst_n = 0;
  logic       en, enc_on;
  logic [1:0] b, d;
  int         checks = 0, failures = 0;

  diff_encoder dut (.clk(clk), .rst_n(rst_n), .en(en), .enc_on(enc_on),
                 .b(b), .d(d));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] ref_d, last_b;
    logic       last_en, last_on;
    en = 0; enc_on = 0; b = '0;
    repeat (2) @(posedge clk);
    checks++;
    if (d != 2'b00) begin failures++; $display("reset value %b", d); end
    @(negedge clk) rst_n = 1;
    ref_d = '0;
    last_en = 0; last_on = 0; last_b = '0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      // the edge just passed used last_en/last_on/last_b
      if (last_en) begin
        logic [1:0] prev;
        prev  = ref_d;
        ref_d = last_on ? (last_b ^ ref_d) : last_b;
        if (last_on) begin
          checks++;
          if ((d ^ prev) != last_b) begin failures++; $display("decode mismatch at %0d", n); end
        end
      end
      checks++;
      if (d != ref_d) begin
        failures++;
        if (failures < 10) $display("step %0d: d=%b expected %b", n, d, ref_d);
      end
      en     = $urandom_range(0, 2) != 0;
      enc_on = (n / 500) % 2 == 1;
      b      = 2'($urandom_range(0, 3));
      last_en = en; last_on = enc_on; last_b = b;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
