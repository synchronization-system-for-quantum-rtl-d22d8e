// tb_start_correction -- the starting correction against a modelled
// synthesizer.  The receiver's clock runs at (1 + E_RX + word/200 MHz) times
// nominal, the transmitter's at (1 + E_TX); the transmitter's continuous
// pulses reach the block through the channel model (jitter +/-10 ps).
// Run 1: E_RX - E_TX = -2e-6 with an intentional offset of +1e-4 and a first
// evaluation time too short for two slips: the block must retry with a
// longer time, find the receiver leading, and leave a residual frequency
// error below 2e-7 (worked out here from the model frequencies; the limit
// is set by the jitter, 10 ps / (6400 ps * 1e-4) = 16 cycles of the
// 10 000-cycle slip period, i.e. 1.6e-7).
// Run 2: the offset the other way (-1e-4): the transmitter leads.
// Run 3: no offset and an error of 1e-9, whose slips take millions of
// cycles: every try must come up short and the block must report failure.
`timescale 1ps/1fs
module tb_start_correction;
  import qkd_sync_pkg::*;
  localparam real E_TX = 1.0e-6, E_RX = -1.0e-6;
  logic rx_clk, tx_clk, sd, rst_n = 1, start = 0;
  logic signed [47:0] f_base = 0, df = 0, word, diff;
  logic [31:0] tau0 = 0, n360;
  logic load, busy, done, fail, leads;
  logic [3:0] tries;
  real e_rx = E_RX, e_tx = E_TX;

  synth_clock_model u_rxc (.err_rel(e_rx), .phase0_ps(777.0), .load(load), .word(word), .clk(rx_clk));
  synth_clock_model u_txc (.err_rel(e_tx), .phase0_ps(0.0), .load(1'b0), .word('0), .clk(tx_clk));
  optical_channel_model #(.DELAY_PS(5000.0), .JITTER_PS(10)) u_ch (.tx_clk(tx_clk), .laser(1'b1), .drop_every(0), .sd(sd));

  start_correction #(.SETTLE(16), .MAX_TRIES(4)) dut (
    .clk(rx_clk), .rst_n(rst_n), .sd_clk(sd), .start(start), .f_base(f_base), .df_const(df), .tau0(tau0),
    .freq_word_o(word), .freq_load_o(load), .busy_o(busy), .done_o(done), .fail_o(fail),
    .diff_o(diff), .n360_o(n360), .rx_leads_o(leads), .tries_o(tries));

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  task automatic run(input longint dfu, input int t0, input longint base);
    @(negedge rx_clk); df = 48'(dfu); tau0 = t0; f_base = 48'(base);
    start = 1; @(negedge rx_clk); start = 0;
    while (!(done || fail)) @(negedge rx_clk);
  endtask

  initial begin
    real resid;
    #1 rst_n = 0; #50000 rst_n = 1;
    // run 1: receiver leads during the measurement
    run(longint'(1.0e-4 * 200.0e12), 6000, 0);
    resid = (E_RX + real'(word) / 200.0e12) - E_TX;
    $display("run1: tries=%0d n360=%0d leads=%0d word=%0d resid=%g", tries, n360, leads, word, resid);
    chk(done && !fail, "run 1 completes");
    chk(tries >= 2, "evaluation time increased after too few slips");
    chk(leads, "receiver leads with the positive offset");
    chk(resid < 2.0e-7 && resid > -2.0e-7, "run 1 residual below 2e-7");
    // run 2: transmitter leads
    run(-longint'(1.0e-4 * 200.0e12), 20000, 0);
    resid = (E_RX + real'(word) / 200.0e12) - E_TX;
    $display("run2: tries=%0d n360=%0d leads=%0d word=%0d resid=%g", tries, n360, leads, word, resid);
    chk(done && !leads, "transmitter leads with the negative offset");
    chk(resid < 2.0e-7 && resid > -2.0e-7, "run 2 residual below 2e-7");
    // run 3: no slips
    e_rx = E_TX + 1.0e-9;
    run(0, 500, 0);
    chk(fail && !done, "failure reported when no slips are seen");
    chk(tries == 4, "all tries used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
