// tb_lfsr_noise: the LFSR output against a bit-serial model of the sequence
// b[n] = b[n-23] ^ b[n-18] (10 new bits per clock), plus a crude uniformity
// check: over 4096 samples each of the 16 top-nibble hist_bins gets 256 +- 96.
module tb_lfsr_noise;
  logic clk = 0, rst_n = 0;
  logic [9:0] sample;
  bit   bits [$];
  int checks = 0, failures = 0;
  int hist_bins [16];

  lfsr_noise dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [22:0] seed;
    seed = 23'h5A5A5;
    // bits[] holds the sequence oldest first; the seed's MSB is the oldest
    for (int i = 22; i >= 0; i--) bits.push_back(seed[i]);
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (sample !== seed[9:0]) failures++;
    rst_n = 1;
    for (int n = 0; n < 4096; n++) begin
      logic [9:0] e;
      @(posedge clk);
      #1;
      for (int k = 0; k < 10; k++) begin
        int L;
        L = bits.size();
        bits.push_back(bits[L-23] ^ bits[L-18]);
      end
      while (bits.size() > 23) void'(bits.pop_front());
      // the newest bit is the sample's LSB
      for (int k = 0; k < 10; k++) e[k] = bits[22 - k];
      checks++;
      if (sample !== e) begin
        failures++;
        if (failures < 10) $display("sample %h expected %h", sample, e);
      end
      hist_bins[sample[9:6]]++;
    end
    foreach (hist_bins[i]) begin
      checks++;
      if (hist_bins[i] < 160 || hist_bins[i] > 352) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
