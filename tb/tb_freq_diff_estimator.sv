// tb_freq_diff_estimator -- two unrelated clocks with a known frequency
// ratio: the receiver at 6400 ps and the detected transmitter pulses at
// 6400*(1+d) ps (receiver leads), then the other way round, with 20 ps of
// random jitter on the pulses.  Expected N360 is worked out here from the
// periods: receiver cycles per one-cycle slip, (1+d)/d or 1/d.  Checked: the
// leading clock, N360 within 1 %, at least two events in the leading FIFO,
// and an evaluation time shorter than one slip period reporting invalid.
`timescale 1ps/1fs
module tb_freq_diff_estimator;
  logic clk = 0, sd = 0, rst_n = 1, start = 0, busy, done, valid, rx_leads;
  logic [31:0] tau = 0, n360;
  logic [15:0] ev1, ev2;
  real rx_half = 3200.0, tx_per = 6400.0;

  freq_diff_estimator dut (.clk(clk), .rst_n(rst_n), .sd_clk(sd), .start(start), .tau(tau),
    .busy(busy), .done(done), .valid(valid), .rx_leads(rx_leads), .n360(n360), .events1(ev1), .events2(ev2));

  always #(rx_half) clk = ~clk;
  initial forever begin
    real j;
    j = real'($urandom_range(200, 0)) / 10.0;
    #(j) sd = 1;
    #(tx_per / 2.0) sd = 0;
    #(tx_per / 2.0 - j);
  end

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  task automatic measure(input int t);
    @(negedge clk); tau = t; start = 1; @(negedge clk); start = 0;
    @(posedge clk iff done); #1;
  endtask

  initial begin
    real d, expn;
    #1 rst_n = 0; #20000 rst_n = 1;
    d = 2.0e-3;
    // receiver faster: transmitter period longer
    tx_per = 6400.0 * (1.0 + d); rx_half = 3200.0;
    expn = (1.0 + d) / d;
    measure(5000);
    $display("rx leads: n360=%0d (%0.1f) ev=%0d/%0d valid=%0d leads=%0d", n360, expn, ev1, ev2, valid, rx_leads);
    chk(valid && rx_leads, "receiver found leading");
    chk(ev1 >= 2, "two or more slips in FIFO 1");
    chk(real'(n360) > 0.99 * expn && real'(n360) < 1.01 * expn, "N360 when receiver leads");
    // transmitter faster
    tx_per = 6400.0; rx_half = 3200.0 * (1.0 + d);
    expn = 1.0 / d;
    measure(5000);
    $display("tx leads: n360=%0d (%0.1f) ev=%0d/%0d valid=%0d leads=%0d", n360, expn, ev1, ev2, valid, rx_leads);
    chk(valid && !rx_leads, "transmitter found leading");
    chk(ev2 >= 2, "two or more slips in FIFO 2");
    chk(real'(n360) > 0.99 * expn && real'(n360) < 1.01 * expn, "N360 when transmitter leads");
    // too short: fewer than two slips
    measure(300);
    chk(!valid, "short evaluation time reports invalid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
