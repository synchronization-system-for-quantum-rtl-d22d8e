// tb_qkd_sync_top -- end-to-end test of the synchronization system at a
// reduced frame size (2000-cycle frame, 200 sync pulses, correction every
// frame).
//
// Alice and Bob run from separate clock models with different oscillator
// errors; Bob's clock follows the synthesizer word the design produces.  An
// optical channel model carries Alice's laser bits to Bob's detector input
// with a fixed delay and +/-25 ps jitter.  The test runs the starting
// correction (its first evaluation time is deliberately too short, forcing a
// retry), switches Alice to framed mode, and lets the periodic PD loop pull
// the phase onto the detector slope.  It then blanks the channel for a few
// frames so that the receiver loses and regains frame lock.
//
// Checked against values computed here: the frequency error left by the
// starting correction, the measured slip period and leading clock, every PD
// update (recomputed from the phase errors), each payload against Alice's
// iteration number, the receive-window length, a constant receive-window
// offset from Alice's transmit window, and the final phase error near the
// target.  Each mechanism (retry, slip-based correction, lock, realignment,
// payload, PD update, intermediate phase error, missed frame, loss and regain
// of lock) must occur at least once.
`timescale 1ps/1fs
module tb_qkd_sync_top;
  import qkd_sync_pkg::*;

  localparam int unsigned SG = 20, NP = 200, PB = 16, EG = 40, GD = 20;
  localparam int unsigned TR = 2000, TC = 2000;
  localparam frame_layout_t L = make_layout(SG, NP, MSEQ_LEN, PB, EG, GD, TR);
  localparam int unsigned PWW = $clog2(TR);

  localparam real E_TX = 1.5e-7;          // Alice oscillator error
  localparam real E_RX = -0.5e-7;         // Bob oscillator error
  localparam real DF_REL = 1.0e-4;        // intentional offset
  localparam longint DF_UHZ = longint'(DF_REL * 200.0e12);
  localparam int unsigned E_TGT = NP;     // half of the 2*NP maximum
  localparam logic [31:0] KP = 32'd1_000_000;   // 3906.25 uHz/count
  localparam logic [31:0] KD = 32'd150_000_000; // 585937.5 uHz/count

  logic tx_clk, rx_clk, sd;
  logic tx_rst_n = 1, rx_rst_n = 1, rx_start = 0;
  tx_mode_e tx_mode = TX_CONTINUOUS;
  int drop_every = 0;

  logic laser, tx_qwin, tx_fs, freq_load, start_done, start_fail, rx_leads, locked;
  seg_e tx_seg;
  logic [PWW-1:0] tx_pos, rx_pos;
  logic [PB-1:0] tx_iter, payload;
  logic signed [47:0] freq_word;
  logic [1:0] stage;
  logic [31:0] n360;
  logic rx_qwin, rx_sw, payload_valid, realign, miss, e_valid, pd_update;
  logic [15:0] e;

  synth_clock_model u_txclk (.err_rel(E_TX), .phase0_ps(0.0), .load(1'b0), .word('0), .clk(tx_clk));
  synth_clock_model u_rxclk (.err_rel(E_RX), .phase0_ps(1234.5), .load(freq_load), .word(freq_word), .clk(rx_clk));
  optical_channel_model #(.DELAY_PS(20000.0), .JITTER_PS(25)) u_ch (
    .tx_clk(tx_clk), .laser(laser), .drop_every(drop_every), .sd(sd));

  qkd_sync_top #(.START_GAP(SG), .PULSES(NP), .PBITS(PB), .END_GAP(EG), .GUARD(GD),
                 .T_REP(TR), .T_CORR(TC)) dut (
    .tx_clk(tx_clk), .tx_rst_n(tx_rst_n), .tx_mode(tx_mode), .laser_o(laser),
    .tx_seg_o(tx_seg), .tx_pos_o(tx_pos), .tx_qwin_o(tx_qwin), .tx_frame_start_o(tx_fs),
    .tx_iter_o(tx_iter),
    .rx_clk(rx_clk), .rx_rst_n(rx_rst_n), .sd_i(sd), .rx_start(rx_start),
    .f_base(48'sd0), .df_const(48'(DF_UHZ)), .tau0(32'd6000), .e_target(16'(E_TGT)),
    .kp(KP), .kd(KD), .r_th(7'd60),
    .freq_word_o(freq_word), .freq_load_o(freq_load), .stage_o(stage),
    .start_done_o(start_done), .start_fail_o(start_fail), .n360_o(n360), .rx_leads_o(rx_leads),
    .locked_o(locked), .rx_pos_o(rx_pos), .rx_qwin_o(rx_qwin), .rx_sync_win_o(rx_sw),
    .payload_o(payload), .payload_valid_o(payload_valid), .realign_o(realign), .miss_o(miss),
    .e_o(e), .e_valid_o(e_valid), .pd_update_o(pd_update)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // mechanism counters
  bit started = 0;
  int n_retry = 0, n_stage1 = 0, n_lock = 0, n_realign = 0, n_payload = 0, n_pd = 0,
      n_mid = 0, n_miss = 0, n_unlock = 0, n_relock = 0;

  // ---------- PD update: recompute from the phase errors ----------
  longint e_cur = -1, e_prev_used = -1;
  longint word_before;
  bit     pd_pending = 0;
  always @(posedge rx_clk) begin
    if (pd_update && started) begin
      longint sum, stepv;
      sum = longint'(KP) * (e_cur - longint'(E_TGT));
      if (e_prev_used >= 0) sum += longint'(KD) * (e_cur - e_prev_used);
      stepv = longint'($floor(real'(sum) / 256.0));
      word_before = freq_word;
      pd_pending = 1;
      e_prev_used = e_cur;
      n_pd++;
      @(posedge rx_clk);
      check(freq_load && longint'(freq_word) == word_before - stepv, "PD update matches control law");
      pd_pending = 0;
    end
    if (e_valid) begin
      e_cur = e;
      if (e > 0 && e < 2 * NP) n_mid++;
    end
  end

  // ---------- payload against Alice's iteration number ----------
  int last_payload = -1;
  always @(posedge rx_clk) if (payload_valid && started) begin
    n_payload++;
    if (drop_every == 0) check(payload == tx_iter, $sformatf("payload %0d == Alice iteration %0d", payload, tx_iter));
    if (last_payload >= 0 && drop_every == 0)
      check(int'(payload) == last_payload + 1 || !locked, "payload increments by one per frame");
    last_payload = payload;
  end

  // ---------- receive window: length and offset ----------
  realtime t_txq = 0, off0 = -1;
  int qlen = 0; bit in_q = 0;
  bit txq_d = 0;
  always @(posedge tx_clk) begin
    if (tx_qwin && !txq_d) t_txq = $realtime;
    txq_d = tx_qwin;
  end
  always @(posedge rx_clk) begin
    if (rx_qwin) qlen++;
    if (rx_qwin && !in_q && locked && n_pd > 5 && drop_every == 0) begin
      realtime off;
      off = $realtime - t_txq;
      if (off0 < 0) off0 = off;
      else check(off - off0 < 6500.0 && off0 - off < 6500.0,
                 $sformatf("receive window offset %0.0f ps stays at %0.0f ps", off, off0));
      check(off > 20000.0 && off < 20000.0 + 8 * 6400.0, $sformatf("offset %0.0f ps = channel delay + a few cycles", off));
    end
    if (!rx_qwin && in_q && drop_every == 0 && locked)
      check(qlen == int'(L.q_end - L.q_start), $sformatf("receive window %0d cycles", qlen));
    if (!rx_qwin) qlen = 0;
    in_q = rx_qwin;
  end

  // ---------- lock bookkeeping ----------
  bit was_locked = 0, lost = 0;
  always @(posedge rx_clk) if (started) begin
    if (realign) n_realign++;
    if (miss) n_miss++;
    if (locked && !was_locked) begin n_lock++; if (lost) n_relock++; $display("lock at %0t", $time); end
    if (!locked && was_locked) begin n_unlock++; lost = 1; last_payload = -1; $display("unlock at %0t", $time); end
    was_locked = locked;
  end

  // ---------- main sequence ----------
  initial begin
    real rel_rx, rel_diff;
    #1 tx_rst_n = 0; rx_rst_n = 0;   // a real falling edge resets every domain
    #100000;
    tx_rst_n = 1; rx_rst_n = 1;
    repeat (10) @(posedge rx_clk);
    rx_start = 1; started = 1; @(posedge rx_clk); rx_start = 0;

    // starting correction
    wait (start_done || start_fail);
    @(posedge rx_clk);
    n_stage1++;
    check(!start_fail, "starting correction finds at least two slips");
    n_retry = int'(dut.u_rx.u_sc.tries_o) - 1;
    rel_rx   = E_RX + real'(freq_word) / 200.0e12;
    rel_diff = rel_rx - E_TX;
    $display("stage 1: n360=%0d rx_leads=%0d tries=%0d word=%0d residual=%g",
             n360, rx_leads, dut.u_rx.u_sc.tries_o, freq_word, rel_diff);
    // N360 is found to within about jitter / (drift per cycle) = 25 ps / 0.64 ps
    // = +/-40 cycles of 10 000, i.e. ~4e-7 of residual error
    check(rel_diff < 5.0e-7 && rel_diff > -5.0e-7, "residual frequency error below 5e-7");
    // during the measurement Bob ran at E_RX + DF_REL, ahead of Alice
    check(rx_leads == 1'b1, "receiver found to lead");
    begin
      real exp_n = (1.0 + E_RX + DF_REL) / (E_RX + DF_REL - E_TX);
      check(real'(n360) > exp_n * 0.995 && real'(n360) < exp_n * 1.005,
            $sformatf("N360 %0d near %0.1f", n360, exp_n));
    end

    // periodic stage
    tx_mode = TX_FRAMED;
    repeat (450 * TR) @(posedge rx_clk);
    check(locked, "frame lock held");
    begin
      int mid = 0;
      longint es = 0;
      repeat (30) begin
        @(posedge rx_clk iff e_valid);
        es += e;
        if (e > 0 && e < 2 * NP) mid++;
      end
      $display("last 30 phase errors: mean %0d, %0d intermediate; word=%0d",
               es / 30, mid, freq_word);
      check(mid >= 20, "phase held on the detector slope");
      check(es / 30 > E_TGT / 2 && es / 30 < 3 * E_TGT / 2, "mean phase error near target");
    end
    // blank the channel: frames are missed and lock is lost, then regained
    drop_every = 1;
    repeat (5 * TR) @(posedge rx_clk);
    check(!locked, "lock dropped after missed frames");
    drop_every = 0;
    repeat (8 * TR) @(posedge rx_clk);
    check(locked, "lock regained");

    check(n_retry >= 1, "evaluation time was increased at least once");
    check(n_stage1 == 1, "starting correction ran");
    check(n_lock >= 1, "frame lock acquired");
    check(n_realign >= 10, "M sequence found in frames");
    check(n_payload >= 10, "payloads received");
    check(n_pd >= 100, "PD iterations ran");
    check(n_mid >= 10, "intermediate phase errors seen");
    check(n_miss >= 1, "missed frames seen");
    check(n_unlock >= 1 && n_relock >= 1, "lock lost and regained");
    $display("mechanisms: retry=%0d stage1=%0d lock=%0d realign=%0d payload=%0d pd=%0d mid=%0d miss=%0d unlock=%0d relock=%0d",
             n_retry, n_stage1, n_lock, n_realign, n_payload, n_pd, n_mid, n_miss, n_unlock, n_relock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (2_000_000) @(posedge tx_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
