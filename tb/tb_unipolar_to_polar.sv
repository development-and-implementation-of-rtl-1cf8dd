// tb_unipolar_to_polar: checks the bit-to-level mapping 1 -> +1, 0 -> -1.
// Both inputs are applied; each level is compared with the integer value and
// with the carrier it produces (a level times a sample must keep the sample
// for a 1 and negate it for a 0).
module tb_unipolar_to_polar;
  import psk_pkg::*;

  logic   bit_in;
  polar_t level;
  int     checks = 0, failures = 0;

  unipolar_to_polar dut (.bit_in(bit_in), .level(level));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int b = 0; b < 2; b++) begin
        int expected, sample;
        bit_in = b[0];
        #1;
        expected = b ? 1 : -1;
        checks++;
        if (int'(level) != expected) begin
          failures++;
          $display("bit %0d: level %0d, expected %0d", b, level, expected);
        end
        sample = int'($urandom_range(0, 255)) - 127;
        checks++;
        if (int'(level) * sample != (b ? sample : -sample)) begin
          failures++;
          $display("bit %0d: level does not keep/negate sample %0d", b, sample);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
