// qkd_sync_top -- the complete synchronization system: the transmitter
// (Alice) sequence generator and the receiver (Bob) synchronization
// controller, side by side.
//
// The two halves sit in different devices and share no clock: `tx_clk` is
// Alice's 156.25 MHz working clock, `rx_clk` Bob's, generated by Bob's
// synthesizer from the reference word `freq_word_o`.  They are joined only
// by the optical channel, which is not logic and is therefore left outside:
// `laser_o` is the bit Alice's synchronization laser sends in each of her
// cycles, and `sd_i` is the pulse signal Bob's synchronization detector
// delivers (one rising front per received pulse).  `tx_mode` chooses
// Alice's continuous pulse train (starting correction) or the framed
// sequence (periodic correction); Bob reports with `start_done_o` when his
// starting correction has finished, and the outside world (a classical
// channel or the host) is expected to switch Alice's mode then.
//
// Parameters are the frame layout and correction period shared by both
// sides; their defaults are the published figures where those exist (see
// qkd_sync_pkg).
module qkd_sync_top
  import qkd_sync_pkg::*;
#(
  parameter int unsigned START_GAP = START_GAP_LEN,
  parameter int unsigned PULSES    = SYNC_PULSES,
  parameter int unsigned PBITS     = PAYLOAD_BITS,
  parameter int unsigned END_GAP   = END_GAP_LEN,
  parameter int unsigned GUARD     = QGUARD_LEN,
  parameter int unsigned T_REP     = T_REP_CYCLES,
  parameter int unsigned T_CORR    = T_CORR_CYCLES,
  parameter int unsigned SETTLE    = 64,
  parameter int unsigned PW        = $clog2(T_REP)
) (
  // ---- transmitter (Alice) ----
  input  logic                 tx_clk,
  input  logic                 tx_rst_n,
  input  tx_mode_e             tx_mode,
  output logic                 laser_o,
  output seg_e                 tx_seg_o,
  output logic [PW-1:0]        tx_pos_o,
  output logic                 tx_qwin_o,
  output logic                 tx_frame_start_o,
  output logic [PBITS-1:0]     tx_iter_o,
  // ---- receiver (Bob) ----
  input  logic                 rx_clk,
  input  logic                 rx_rst_n,
  input  logic                 sd_i,
  input  logic                 rx_start,
  input  logic signed [FW-1:0] f_base,
  input  logic signed [FW-1:0] df_const,
  input  logic        [31:0]   tau0,
  input  logic        [15:0]   e_target,
  input  logic        [31:0]   kp,
  input  logic        [31:0]   kd,
  input  logic        [6:0]    r_th,
  output logic signed [FW-1:0] freq_word_o,
  output logic                 freq_load_o,
  output logic        [1:0]    stage_o,
  output logic                 start_done_o,
  output logic                 start_fail_o,
  output logic        [31:0]   n360_o,
  output logic                 rx_leads_o,
  output logic                 locked_o,
  output logic        [PW-1:0] rx_pos_o,
  output logic                 rx_qwin_o,
  output logic                 rx_sync_win_o,
  output logic [PBITS-1:0]     payload_o,
  output logic                 payload_valid_o,
  output logic                 realign_o,
  output logic                 miss_o,
  output logic        [15:0]   e_o,
  output logic                 e_valid_o,
  output logic                 pd_update_o
);

  sync_seq_gen #(
    .START_GAP(START_GAP), .PULSES(PULSES), .PBITS(PBITS), .END_GAP(END_GAP),
    .GUARD(GUARD), .T_REP(T_REP), .PW(PW)
  ) u_tx (
    .clk(tx_clk), .rst_n(tx_rst_n), .mode(tx_mode),
    .laser_o(laser_o), .seg_o(tx_seg_o), .pos_o(tx_pos_o), .qwin_o(tx_qwin_o),
    .frame_start_o(tx_frame_start_o), .iter_o(tx_iter_o)
  );

  sync_rx #(
    .START_GAP(START_GAP), .PULSES(PULSES), .PBITS(PBITS), .END_GAP(END_GAP),
    .GUARD(GUARD), .T_REP(T_REP), .T_CORR(T_CORR), .SETTLE(SETTLE),
    .EW(16), .KW(32), .PW(PW)
  ) u_rx (
    .clk(rx_clk), .rst_n(rx_rst_n), .sd_i(sd_i), .start(rx_start),
    .f_base(f_base), .df_const(df_const), .tau0(tau0),
    .e_target(e_target), .kp(kp), .kd(kd), .r_th(r_th),
    .freq_word_o(freq_word_o), .freq_load_o(freq_load_o), .stage_o(stage_o),
    .start_done_o(start_done_o), .start_fail_o(start_fail_o),
    .n360_o(n360_o), .rx_leads_o(rx_leads_o), .locked_o(locked_o),
    .pos_o(rx_pos_o), .qwin_o(rx_qwin_o), .sync_win_o(rx_sync_win_o),
    .payload_o(payload_o), .payload_valid_o(payload_valid_o),
    .realign_o(realign_o), .miss_o(miss_o),
    .e_o(e_o), .e_valid_o(e_valid_o), .pd_update_o(pd_update_o)
  );

endmodule
