// tb_psk_output: checks the output stage.  Random I and Q products, including
// the extreme values, are applied with a random mode per clock; one clock
// later the output must be I + Q in QPSK mode and I alone in BPSK mode.
module tb_psk_output;
  import psk_pkg::*;

  logic     clk = 0, rst_n = 0;
  logic     qpsk;
  prod_t    i_prod, q_prod;
  psk_out_t psk_out;
  int       checks = 0, failures = 0;
  int       n_bpsk = 0, n_qpsk = 0;

  psk_output dut (.clk(clk), .rst_n(rst_n), .qpsk(qpsk), .i_prod(i_prod),
                  .q_prod(q_prod), .psk_out(psk_out));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pick();
    case ($urandom_range(0, 5))
      0: return -1024;
      1: return 1023;
      default: return int'($urandom_range(0, 2047)) - 1024;
    endcase
  endfunction

  initial begin
    int expected;
    bit have_prev;
    qpsk = 0; i_prod = '0; q_prod = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    have_prev = 0;
    for (int n = 0; n < 5000; n++) begin
      int vi, vq;
      @(negedge clk);
      if (have_prev) begin
        checks++;
        if (int'(psk_out) != expected) begin
          failures++;
          if (failures < 10) $display("out %0d, expected %0d", psk_out, expected);
        end
      end
      vi = pick();
      vq = pick();
      i_prod = prod_t'(vi);
      q_prod = prod_t'(vq);
      qpsk = $urandom_range(0, 1) == 1;
      if (qpsk) n_qpsk++; else n_bpsk++;
      expected = qpsk ? vi + vq : vi;
      have_prev = 1;
    end
    checks++;
    if (n_bpsk == 0 || n_qpsk == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
