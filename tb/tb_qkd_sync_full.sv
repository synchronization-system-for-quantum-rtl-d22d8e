// tb_qkd_sync_full -- the whole system at its full size: 500 000-cycle
// (3.2 ms) frames, 5000 sync pulses, a 127-bit M sequence and the periodic
// correction every 7 812 500 cycles (50 ms), over a 100 km fiber line
// (490 us of delay, about 76 600 cycles).
//
// Alice and Bob run from separate clock models; Bob's follows the word the
// design produces.  The receiver is started once the detector sees light.
// The starting correction runs with a 1e-5 intentional offset and a first
// evaluation time that is too short (65 536 cycles against a slip period of
// about 100 000), so it has to double it.  Alice then sends framed
// sequences, and the test runs through three periodic corrections.
//
// Checked: the starting correction ends with the right leading clock, a
// slip period within 0.5 % of the expected one and a remaining frequency
// error below 1e-7; the receiver locks onto the frames; every payload equals
// Alice's iteration number; each receive window is as long as Alice's
// quantum window and starts the line delay (plus a few cycles) after it;
// every phase error is within 0..2*5000; the PD updates come T_CORR cycles
// apart and follow the control law.  Convergence of the loop is tested at
// reduced size (tb_qkd_sync_top, tb_sync_rx), where it takes many updates.
`timescale 1ps/1fs
module tb_qkd_sync_full;
  import qkd_sync_pkg::*;

  localparam frame_layout_t L = make_layout(START_GAP_LEN, SYNC_PULSES, MSEQ_LEN, PAYLOAD_BITS,
                                            END_GAP_LEN, QGUARD_LEN, T_REP_CYCLES);
  localparam int unsigned PWW = $clog2(T_REP_CYCLES);
  localparam real DELAY_PS = 490.0e6;     // 100 km of fiber at 4.9 us/km
  localparam real E_TX = 3.0e-8;
  localparam real E_RX = -2.0e-8;
  localparam real DF_REL = 1.0e-5;
  localparam longint DF_UHZ = longint'(DF_REL * 200.0e12);
  localparam int unsigned E_TGT = SYNC_PULSES;
  localparam logic [31:0] KP = 32'd100;
  localparam logic [31:0] KD = 32'd1000;

  logic tx_clk, rx_clk, sd;
  logic tx_rst_n = 1, rx_rst_n = 1, rx_start = 0;
  tx_mode_e tx_mode = TX_CONTINUOUS;

  logic laser, tx_qwin, tx_fs, freq_load, start_done, start_fail, rx_leads, locked;
  seg_e tx_seg;
  logic [PWW-1:0] tx_pos, rx_pos;
  logic [PAYLOAD_BITS-1:0] tx_iter, payload;
  logic signed [47:0] freq_word;
  logic [1:0] stage;
  logic [31:0] n360;
  logic rx_qwin, rx_sw, payload_valid, realign, miss, e_valid, pd_update;
  logic [15:0] e;

  synth_clock_model u_txclk (.err_rel(E_TX), .phase0_ps(0.0), .load(1'b0), .word('0), .clk(tx_clk));
  synth_clock_model u_rxclk (.err_rel(E_RX), .phase0_ps(2500.0), .load(freq_load), .word(freq_word), .clk(rx_clk));
  optical_channel_model #(.DELAY_PS(DELAY_PS), .JITTER_PS(10)) u_ch (
    .tx_clk(tx_clk), .laser(laser), .drop_every(0), .sd(sd));

  qkd_sync_top dut (
    .tx_clk(tx_clk), .tx_rst_n(tx_rst_n), .tx_mode(tx_mode), .laser_o(laser),
    .tx_seg_o(tx_seg), .tx_pos_o(tx_pos), .tx_qwin_o(tx_qwin), .tx_frame_start_o(tx_fs),
    .tx_iter_o(tx_iter),
    .rx_clk(rx_clk), .rx_rst_n(rx_rst_n), .sd_i(sd), .rx_start(rx_start),
    .f_base(48'sd0), .df_const(48'(DF_UHZ)), .tau0(32'd65536), .e_target(16'(E_TGT)),
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
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  bit started = 0;
  int n_pd = 0, n_payload = 0, n_e = 0, n_win = 0, n_lock = 0;
  longint cyc = 0, last_pd_cyc = -1;
  longint e_cur = -1, e_prev_used = -1;

  always @(posedge rx_clk) begin
    cyc++;
    if (pd_update && started) begin
      longint sum, stepv, wb;
      if (last_pd_cyc >= 0)
        check(cyc - last_pd_cyc == T_CORR_CYCLES, $sformatf("PD update interval %0d", cyc - last_pd_cyc));
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
      $display("PD update %0d: e=%0d word=%0d", n_pd, e_cur, freq_word);
    end
    if (e_valid && started) begin
      e_cur = e;
      n_e++;
      check(e <= 16'(2 * SYNC_PULSES), $sformatf("phase error %0d within 0..%0d", e, 2 * SYNC_PULSES));
    end
  end

  always @(posedge rx_clk) if (payload_valid && started) begin
    n_payload++;
    check(payload == tx_iter, $sformatf("payload %0d == Alice iteration %0d", payload, tx_iter));
  end

  // receive window against Alice's quantum window
  realtime t_txq = 0;
  bit txq_d = 0, in_q = 0, was_locked = 0;
  int qlen = 0;
  always @(posedge tx_clk) begin
    if (tx_qwin && !txq_d) t_txq = $realtime;
    txq_d = tx_qwin;
  end
  always @(posedge rx_clk) if (started) begin
    if (locked && !was_locked) n_lock++;
    was_locked = locked;
    if (rx_qwin) qlen++;
    if (rx_qwin && !in_q && locked) begin
      realtime off;
      off = $realtime - t_txq;
      check(off > DELAY_PS && off < DELAY_PS + 8 * 6400.0,
            $sformatf("receive window %0.0f ps after the transmit window", off));
    end
    if (!rx_qwin && in_q && locked) begin
      n_win++;
      check(qlen == int'(L.q_end - L.q_start), $sformatf("receive window %0d cycles", qlen));
    end
    if (!rx_qwin) qlen = 0;
    in_q = rx_qwin;
  end

  initial begin
    real rel_diff, exp_n;
    #1 tx_rst_n = 0; rx_rst_n = 0;
    #100000;
    tx_rst_n = 1; rx_rst_n = 1;
    // the receiver starts once light reaches its detector
    @(posedge sd);
    repeat (100) @(posedge rx_clk);
    rx_start = 1; started = 1; @(posedge rx_clk); rx_start = 0;
    wait (start_done || start_fail);
    @(posedge rx_clk);
    check(!start_fail, "starting correction finds at least two slips");
    check(dut.u_rx.u_sc.tries_o >= 2, "evaluation time was increased");
    check(rx_leads == 1'b1, "receiver found to lead");
    exp_n = (1.0 + E_RX + DF_REL) / (E_RX + DF_REL - E_TX);
    check(real'(n360) > exp_n * 0.995 && real'(n360) < exp_n * 1.005,
          $sformatf("N360 %0d near %0.1f", n360, exp_n));
    rel_diff = E_RX + real'(freq_word) / 200.0e12 - E_TX;
    $display("stage 1 at %0t: n360=%0d tries=%0d word=%0d residual=%g",
             $time, n360, dut.u_rx.u_sc.tries_o, freq_word, rel_diff);
    check(rel_diff < 1.0e-7 && rel_diff > -1.0e-7, "residual frequency error below 1e-7");
    check(stage == 2'd2, "periodic stage entered");

    tx_mode = TX_FRAMED;
    wait (n_pd == 3);
    repeat (10) @(posedge rx_clk);
    $display("payloads=%0d phase errors=%0d windows=%0d locks=%0d", n_payload, n_e, n_win, n_lock);
    check(n_lock >= 1, "frame lock acquired");
    check(n_payload >= 40, "payloads received every frame");
    check(n_e >= 40, "a phase error every frame");
    check(n_win >= 40, "receive windows produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge tx_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
