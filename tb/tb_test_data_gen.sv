// tb_test_data_gen: checks the PN test data generator.
// The reference sequence is built from the recurrence a[n+9] = a[n] ^ a[n+4]
// started from nine ones (the seed).  In BPSK mode each symbol must carry the
// next bit on I (and Q); in QPSK mode the next two bits, first on I, second
// on Q.  Symbols are advanced by a random enable with the mode changing in
// phases.  The test also checks that the stream repeats after 511 bits and
// not before.
module tb_test_data_gen;

  localparam int NBITS = 6000;

  logic clk = 0, rst_n = 0;
  logic adv, qpsk;
  logic bit_i, bit_q;
  int   checks = 0, failures = 0;
  int   n_bpsk = 0, n_qpsk = 0;
  bit   seq [NBITS];

  test_data_gen dut (.clk(clk), .rst_n(rst_n), .adv(adv), .qpsk(qpsk),
                     .bit_i(bit_i), .bit_q(bit_q));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ptr, period;
    bit last_adv, last_qpsk;
    for (int n = 0; n < 9; n++) seq[n] = 1;
    for (int n = 9; n < NBITS; n++) seq[n] = seq[n-9] ^ seq[n-5];
    // maximal length: first repeat of the 9-bit window at 511
    period = 0;
    for (int s = 1; s < 1100 && period == 0; s++) begin
      bit same;
      same = 1;
      for (int k = 0; k < 9; k++) if (seq[s+k] != seq[k]) same = 0;
      if (same) period = s;
    end
    checks++;
    if (period != 511) begin failures++; $display("reference period %0d", period); end

    adv = 0; qpsk = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    ptr = 0; last_adv = 0; last_qpsk = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (last_adv) ptr += last_qpsk ? 2 : 1;
      qpsk = (n / 300) % 2 == 1;
      #1;
      checks++;
      if (qpsk) begin
        if (bit_i != seq[ptr] || bit_q != seq[ptr+1]) begin
          failures++;
          if (failures < 10) $display("QPSK bit %0d: got %b%b expected %b%b", ptr, bit_i, bit_q, seq[ptr], seq[ptr+1]);
        end
        n_qpsk++;
      end else begin
        if (bit_i != seq[ptr] || bit_q != seq[ptr]) begin
          failures++;
          if (failures < 10) $display("BPSK bit %0d: got %b/%b expected %b", ptr, bit_i, bit_q, seq[ptr]);
        end
        n_bpsk++;
      end
      adv = $urandom_range(0, 3) != 0;
      last_adv = adv; last_qpsk = qpsk;
    end
    checks++;
    if (ptr < 1100) begin failures++; $display("too few bits covered: %0d", ptr); end
    $display("bits covered %0d, BPSK steps %0d, QPSK steps %0d", ptr, n_bpsk, n_qpsk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
