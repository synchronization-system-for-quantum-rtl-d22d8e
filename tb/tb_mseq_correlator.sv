// tb_mseq_correlator -- feeds the correlator a stream built here: zeros, a
// 1010... pulse run, one period of the M sequence (from the recurrence
// s[n+7] = s[n] ^ s[n+3], all-ones start), payload-like random bits, then
// the same with three sequence pulses lost, then 200 ones.  Every cycle the
// ACF is compared with a popcount of (last 127 bits AND reversed sequence)
// computed here; a peak must occur exactly at the cycle after each sequence
// (ACF 64 and 61 with threshold 60) and nowhere else except in the run of
// ones, which gives ACF 64 as expected for 0/1 correlation.
`timescale 1ns/1ps
module tb_mseq_correlator;
  logic clk = 0, rst_n = 0, bit_i = 0, en = 1, peak;
  logic [6:0] acf;
  mseq_correlator dut (.clk(clk), .rst_n(rst_n), .bit_i(bit_i), .en(en), .r_th(7'd60), .acf_o(acf), .peak_o(peak));
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit m [0:126];
  bit stream [$];
  int seq_end [$];   // index of the first bit after each sequence
  int ones_start;

  initial begin
    bit r [0:140];
    bit hist [$];
    int exp_acf, npk;
    for (int i = 0; i < 7; i++) r[i] = 1;
    for (int n = 0; n + 7 <= 140; n++) r[n+7] = r[n] ^ r[n+3];
    for (int i = 0; i < 127; i++) m[i] = r[i];
    repeat (150) stream.push_back(0);
    for (int i = 0; i < 200; i++) stream.push_back(i % 2 == 0);
    for (int i = 0; i < 127; i++) stream.push_back(m[i]);
    seq_end.push_back(stream.size());
    repeat (40) stream.push_back($urandom_range(1, 0));
    repeat (300) stream.push_back(0);
    for (int i = 0; i < 200; i++) stream.push_back(i % 2 == 0);
    for (int i = 0; i < 127; i++) stream.push_back(m[i] && !(i == 20 || i == 50 || i == 90));
    seq_end.push_back(stream.size());
    repeat (300) stream.push_back(0);
    ones_start = stream.size();
    repeat (200) stream.push_back(1);
    repeat (50) stream.push_back(0);

    repeat (2) @(negedge clk); rst_n = 1;
    npk = 0;
    for (int k = 0; k < stream.size(); k++) begin
      bit_i = stream[k];
      // the window is the 127 bits before index k
      exp_acf = 0;
      for (int j = 0; j < 127; j++) begin
        int idx;
        idx = k - 127 + j;
        if (idx >= 0 && stream[idx] && m[j]) exp_acf++;
      end
      #1;
      checks++; if (int'(acf) != exp_acf) begin failures++; $display("FAIL acf %0d vs %0d at %0d", acf, exp_acf, k); end
      if (k == seq_end[0] || k == seq_end[1]) begin
        checks++; if (!peak) begin failures++; $display("FAIL no peak at %0d (acf %0d)", k, acf); end
        npk++;
      end else if (k < ones_start + 100) begin
        checks++; if (peak) begin failures++; $display("FAIL false peak at %0d acf=%0d", k, acf); end
      end
      @(negedge clk);
    end
    checks++; if (npk != 2) failures++;
    // gate
    en = 0; #1; checks++; if (peak) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
