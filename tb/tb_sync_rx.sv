// tb_sync_rx -- the receiver on its own, fed by a transmitter sequence
// generator through a channel model, at a reduced frame size (2000-cycle
// frame, 200 sync pulses) with the periodic correction every third frame.
//
// Here the receiver's intentional offset is negative, so the transmitter's
// clock leads during the starting correction.  Checked: the stage sequence
// idle -> starting -> periodic, the slip period and leading clock, the
// remaining frequency error, that PD updates come exactly T_CORR cycles
// apart and follow the control law using the latest phase error, that the
// synthesizer word is loaded only by the two correction stages, payloads
// against the transmitter's iteration number, and that the phase settles on
// the detector slope near the target.  Then the transmitter's oscillator
// steps by +5e-7 (a drift the periodic stage exists to follow): the word
// must follow it by 5e-7 x 200 MHz = 100 000 000 uHz (within 10 %) and the
// phase must settle near the target again.
`timescale 1ps/1fs
module tb_sync_rx;
  import qkd_sync_pkg::*;

  localparam int unsigned SG = 20, NP = 200, PB = 16, EG = 40, GD = 20;
  localparam int unsigned TR = 2000, TC = 3 * TR;
  localparam int unsigned PWW = $clog2(TR);

  localparam real E_TX = 0.8e-7;
  localparam real E_STEP = 5.0e-7;
  localparam real E_RX = 2.0e-7;
  localparam real DF_REL = -1.0e-4;
  localparam longint DF_UHZ = longint'(DF_REL * 200.0e12);
  localparam int unsigned E_TGT = NP;
  localparam logic [31:0] KP = 32'd1_000_000;
  localparam logic [31:0] KD = 32'd150_000_000;

  logic tx_clk, rx_clk, sd;
  logic tx_rst_n = 1, rx_rst_n = 1, start = 0;
  tx_mode_e tx_mode = TX_CONTINUOUS;
  logic laser, tx_qwin, tx_fs;
  seg_e tx_seg;
  logic [PWW-1:0] tx_pos, rx_pos;
  logic [PB-1:0] tx_iter, payload;

  logic signed [47:0] freq_word;
  logic freq_load, start_done, start_fail, rx_leads, locked, qwin, swin, pvalid, realign, miss;
  logic e_valid, pd_update;
  logic [1:0] stage;
  logic [31:0] n360;
  logic [15:0] e;

  real e_tx = E_TX;
  synth_clock_model u_txclk (.err_rel(e_tx), .phase0_ps(0.0), .load(1'b0), .word('0), .clk(tx_clk));
  synth_clock_model u_rxclk (.err_rel(E_RX), .phase0_ps(3000.0), .load(freq_load), .word(freq_word), .clk(rx_clk));
  optical_channel_model #(.DELAY_PS(50000.0), .JITTER_PS(20)) u_ch (
    .tx_clk(tx_clk), .laser(laser), .drop_every(0), .sd(sd));

  sync_seq_gen #(.START_GAP(SG), .PULSES(NP), .PBITS(PB), .END_GAP(EG), .GUARD(GD), .T_REP(TR)) u_tx (
    .clk(tx_clk), .rst_n(tx_rst_n), .mode(tx_mode), .laser_o(laser), .seg_o(tx_seg), .pos_o(tx_pos),
    .qwin_o(tx_qwin), .frame_start_o(tx_fs), .iter_o(tx_iter));

  sync_rx #(.START_GAP(SG), .PULSES(NP), .PBITS(PB), .END_GAP(EG), .GUARD(GD), .T_REP(TR),
            .T_CORR(TC)) dut (
    .clk(rx_clk), .rst_n(rx_rst_n), .sd_i(sd), .start(start),
    .f_base(48'sd0), .df_const(48'(DF_UHZ)), .tau0(32'd20000), .e_target(16'(E_TGT)),
    .kp(KP), .kd(KD), .r_th(7'd60),
    .freq_word_o(freq_word), .freq_load_o(freq_load), .stage_o(stage),
    .start_done_o(start_done), .start_fail_o(start_fail), .n360_o(n360), .rx_leads_o(rx_leads),
    .locked_o(locked), .pos_o(rx_pos), .qwin_o(qwin), .sync_win_o(swin),
    .payload_o(payload), .payload_valid_o(pvalid), .realign_o(realign), .miss_o(miss),
    .e_o(e), .e_valid_o(e_valid), .pd_update_o(pd_update));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  bit started = 0;
  int n_pd = 0, n_payload = 0, n_loads_bad = 0;
  longint cyc = 0, last_pd_cyc = -1;
  longint e_cur = -1, e_prev_used = -1;
  logic [1:0] stage_d = 0;
  int stage_steps = 0;

  always @(posedge rx_clk) begin
    cyc++;
    if (started) begin
      if (stage != stage_d) begin
        check(stage == stage_d + 1, $sformatf("stage %0d follows %0d", stage, stage_d));
        stage_steps++;
      end
      stage_d = stage;
      if (freq_load && stage == 0) n_loads_bad++;
    end
    if (pd_update && started) begin
      longint sum, stepv, wb;
      check(stage == 2, "PD update only in the periodic stage");
      if (last_pd_cyc >= 0) check(cyc - last_pd_cyc == TC, $sformatf("PD update interval %0d", cyc - last_pd_cyc));
      last_pd_cyc = cyc;
      sum = longint'(KP) * (e_cur - longint'(E_TGT));
      if (e_prev_used >= 0) sum += longint'(KD) * (e_cur - e_prev_used);
      stepv = longint'($floor(real'(sum) / 256.0));
      wb = freq_word;
      e_prev_used = e_cur;
      n_pd++;
      @(posedge rx_clk);
      cyc++;
      check(freq_load && longint'(freq_word) == wb - stepv, "PD update matches control law");
    end
    if (e_valid) e_cur = e;
  end

  always @(posedge rx_clk) if (pvalid && started) begin
    n_payload++;
    check(payload == tx_iter, $sformatf("payload %0d == transmitter iteration %0d", payload, tx_iter));
  end

  initial begin
    real rel_diff;
    #1 tx_rst_n = 0; rx_rst_n = 0;
    #100000;
    tx_rst_n = 1; rx_rst_n = 1;
    repeat (10) @(posedge rx_clk);
    check(stage == 0, "idle before start");
    start = 1; started = 1; @(posedge rx_clk); start = 0;
    wait (start_done || start_fail);
    @(posedge rx_clk);
    check(!start_fail, "starting correction succeeds");
    check(rx_leads == 1'b0, "transmitter found to lead");
    begin
      real exp_n = (1.0 + E_RX + DF_REL) / (E_TX - E_RX - DF_REL);
      check(real'(n360) > exp_n * 0.995 && real'(n360) < exp_n * 1.005,
            $sformatf("N360 %0d near %0.1f", n360, exp_n));
    end
    rel_diff = E_RX + real'(freq_word) / 200.0e12 - E_TX;
    $display("stage 1: n360=%0d word=%0d residual=%g", n360, freq_word, rel_diff);
    check(rel_diff < 5.0e-7 && rel_diff > -5.0e-7, "residual frequency error below 5e-7");

    tx_mode = TX_FRAMED;
    repeat (200 * TC) @(posedge rx_clk);
    check(locked, "frame lock held");
    check(stage == 2 && stage_steps == 2, "two stage transitions");
    check(n_loads_bad == 0, "no synthesizer load while idle");
    check(n_pd >= 150, $sformatf("%0d PD updates", n_pd));
    check(n_payload >= 400, $sformatf("%0d payloads", n_payload));
    begin
      longint es = 0;
      int mid = 0;
      repeat (20) begin
        @(posedge rx_clk iff e_valid);
        es += e;
        if (e > 0 && e < 2 * NP) mid++;
      end
      $display("last 20 phase errors: mean %0d, %0d intermediate", es / 20, mid);
      check(mid >= 15, "phase on the detector slope");
      check(es / 20 > E_TGT / 2 && es / 20 < 3 * E_TGT / 2, "mean phase error near target");
    end
    // oscillator step during operation; the word is compared as an average
    // over 40 updates, since the D term moves it a lot from one to the next
    begin
      real w0, w1;
      longint es = 0;
      int mid = 0;
      w0 = 0.0;
      repeat (40) begin @(posedge rx_clk iff pd_update); @(posedge rx_clk); w0 += real'(freq_word) / 40.0; end
      e_tx = E_TX + E_STEP;
      repeat (160 * TC) @(posedge rx_clk);
      check(locked, "frame lock held through the step");
      w1 = 0.0;
      repeat (40) begin @(posedge rx_clk iff pd_update); @(posedge rx_clk); w1 += real'(freq_word) / 40.0; end
      $display("mean word moved by %0.0f uHz after the step; mean frequency error before %g, after %g",
               w1 - w0, E_RX + w0 / 200.0e12 - E_TX, E_RX + w1 / 200.0e12 - e_tx);
      check(w1 - w0 > 0.9 * E_STEP * 200.0e12 && w1 - w0 < 1.1 * E_STEP * 200.0e12,
            "word follows the oscillator step");
      repeat (20) begin
        @(posedge rx_clk iff e_valid);
        es += e;
        if (e > 0 && e < 2 * NP) mid++;
      end
      $display("after the step: mean %0d, %0d intermediate", es / 20, mid);
      check(mid >= 15, "phase back on the detector slope");
      check(es / 20 > E_TGT / 2 && es / 20 < 3 * E_TGT / 2, "mean phase error near target after the step");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6_000_000) @(posedge tx_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
