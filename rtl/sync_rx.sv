// sync_rx -- receiver (Bob) side of the synchronization system.
//
// It steers the receiver's synthesizer reference frequency so that the
// receiver's 156.25 MHz working clock follows the transmitter's, in two
// stages, and places the quantum-state receive window in time.
//
//  * Starting correction (start_correction): while the transmitter sends a
//    continuous pulse train, the slip period N360 between the detected
//    pulses and the receiver clock is measured with two dual-clock FIFOs and
//    the reference word is corrected once by F_REF / N360.
//  * Periodic correction: in framed mode every synchronization sequence
//    passes the phase detector; the phase errors of its sync_pulse segment
//    are summed (phase_error_accum) and, every T_CORR cycles, the PD
//    controller moves the reference word so as to hold that sum at
//    `e_target`.
//  * Window alignment: the M-sequence correlator and rx_frame_timer align
//    the receiver's frame to the received sequence, giving the phase-error
//    window, the quantum receive window and the payload (iteration number).
//
// The structure follows the published system.  This design's choices: the
// stage sequencing below, the use of the latest finished phase error at each
// T_CORR tick (none is used before the first one exists), and the
// run-time inputs for the gains, the target, the threshold, the
// intentional offset and the initial evaluation time.
//
// Interface: `start` (one cycle) runs the starting correction from the word
// `f_base`; `stage_o` is 0 idle, 1 starting correction, 2 periodic
// correction.  `start_done_o` rises when the periodic stage begins: the
// transmitter is expected to switch to framed mode then (how it learns this
// is outside this block).  `freq_word_o` / `freq_load_o` go to the
// synthesizer: signed offset from the nominal 200 MHz reference in uHz.
// `sd_i` is the synchronization-detector output; it is used as a clock.
module sync_rx
  import qkd_sync_pkg::*;
#(
  parameter int unsigned START_GAP  = START_GAP_LEN,
  parameter int unsigned PULSES     = SYNC_PULSES,
  parameter int unsigned PBITS      = PAYLOAD_BITS,
  parameter int unsigned END_GAP    = END_GAP_LEN,
  parameter int unsigned GUARD      = QGUARD_LEN,
  parameter int unsigned T_REP      = T_REP_CYCLES,
  parameter int unsigned T_CORR     = T_CORR_CYCLES,
  parameter int unsigned FIFO_AW    = 4,
  parameter int unsigned SETTLE     = 64,
  parameter int unsigned MAX_TRIES  = 4,
  parameter int unsigned SEARCH     = 16,
  parameter int unsigned MISS_LIMIT = 3,
  parameter int unsigned EW         = 16,
  parameter int unsigned KW         = 32,
  parameter int unsigned KFRAC      = 8,
  parameter int unsigned PW         = $clog2(T_REP)
) (
  input  logic                 clk,          // receiver 156.25 MHz
  input  logic                 rst_n,
  input  logic                 sd_i,         // synchronization detector
  input  logic                 start,
  input  logic signed [FW-1:0] f_base,
  input  logic signed [FW-1:0] df_const,
  input  logic        [31:0]   tau0,
  input  logic        [EW-1:0] e_target,
  input  logic        [KW-1:0] kp,
  input  logic        [KW-1:0] kd,
  input  logic        [6:0]    r_th,
  output logic signed [FW-1:0] freq_word_o,
  output logic                 freq_load_o,
  output logic        [1:0]    stage_o,
  output logic                 start_done_o,
  output logic                 start_fail_o,
  output logic        [31:0]   n360_o,
  output logic                 rx_leads_o,
  output logic                 locked_o,
  output logic        [PW-1:0] pos_o,
  output logic                 qwin_o,
  output logic                 sync_win_o,
  output logic        [PBITS-1:0] payload_o,
  output logic                 payload_valid_o,
  output logic                 realign_o,
  output logic                 miss_o,
  output logic        [EW-1:0] e_o,
  output logic                 e_valid_o,
  output logic                 pd_update_o
);

  // ---------------- stage sequencing ----------------
  typedef enum logic [1:0] {ST_IDLE = 2'd0, ST_START = 2'd1, ST_PERIODIC = 2'd2} stage_e;
  stage_e stage;

  logic                 sc_done, sc_fail, sc_load, sc_busy;
  logic signed [FW-1:0] sc_word, sc_diff;
  logic [3:0]           sc_tries;
  logic                 pd_init, pd_update, pd_load;
  logic signed [FW-1:0] pd_word, pd_step;
  logic [31:0]          tcorr_cnt;
  logic                 have_e;
  logic [EW-1:0]        e_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage        <= ST_IDLE;
      start_fail_o <= 1'b0;
      tcorr_cnt    <= '0;
      have_e       <= 1'b0;
      e_last       <= '0;
      pd_update    <= 1'b0;
    end else begin
      pd_update <= 1'b0;
      unique case (stage)
        ST_IDLE: if (start) begin
          stage        <= ST_START;
          start_fail_o <= 1'b0;
        end
        ST_START: begin
          if (sc_done) begin
            stage     <= ST_PERIODIC;
            tcorr_cnt <= '0;
            have_e    <= 1'b0;
          end else if (sc_fail) begin
            stage        <= ST_IDLE;
            start_fail_o <= 1'b1;
          end
        end
        ST_PERIODIC: begin
          if (start) begin
            stage <= ST_START;
          end else begin
            if (e_valid_o) begin
              e_last <= e_o;
              have_e <= 1'b1;
            end
            if (tcorr_cnt == 32'(T_CORR - 1)) begin
              tcorr_cnt <= '0;
              pd_update <= have_e;
            end else begin
              tcorr_cnt <= tcorr_cnt + 1'b1;
            end
          end
        end
        default: stage <= ST_IDLE;
      endcase
    end
  end

  assign stage_o      = stage;
  assign start_done_o = (stage == ST_PERIODIC);
  assign pd_init      = sc_done;
  assign pd_update_o  = pd_update;

  // ---------------- starting correction ----------------
  start_correction #(.AW(FIFO_AW), .CW(32), .SETTLE(SETTLE), .MAX_TRIES(MAX_TRIES)) u_sc (
    .clk(clk), .rst_n(rst_n), .sd_clk(sd_i),
    .start(start && stage != ST_START), .f_base(f_base), .df_const(df_const), .tau0(tau0),
    .freq_word_o(sc_word), .freq_load_o(sc_load), .busy_o(sc_busy),
    .done_o(sc_done), .fail_o(sc_fail), .diff_o(sc_diff),
    .n360_o(n360_o), .rx_leads_o(rx_leads_o), .tries_o(sc_tries)
  );

  // ---------------- phase detector and bit capture ----------------
  logic sd_rst_n, q_sd, q_rx, bit_rx;

  rst_sync u_sdrst (.clk(sd_i), .arst_n(rst_n), .rst_n_o(sd_rst_n));

  phase_detector u_pd (
    .sd_i(sd_i), .sd_rst_n(sd_rst_n), .rx_clk(clk), .rx_rst_n(rst_n),
    .q_sd(q_sd), .q_o(q_rx), .bit_o(bit_rx)
  );

  // ---------------- M sequence and frame timing ----------------
  logic       peak, corr_en, phase_win;
  logic [6:0] acf;

  mseq_correlator u_corr (
    .clk(clk), .rst_n(rst_n), .bit_i(bit_rx), .en(corr_en), .r_th(r_th),
    .acf_o(acf), .peak_o(peak)
  );

  rx_frame_timer #(
    .START_GAP(START_GAP), .PULSES(PULSES), .PBITS(PBITS), .END_GAP(END_GAP),
    .GUARD(GUARD), .T_REP(T_REP), .SEARCH(SEARCH), .MISS_LIMIT(MISS_LIMIT), .PW(PW)
  ) u_ft (
    .clk(clk), .rst_n(rst_n), .enable(stage == ST_PERIODIC),
    .bit_i(bit_rx), .peak_i(peak), .corr_en_o(corr_en), .locked_o(locked_o),
    .pos_o(pos_o), .phase_win_o(phase_win), .sync_win_o(sync_win_o), .qwin_o(qwin_o),
    .payload_o(payload_o), .payload_valid_o(payload_valid_o),
    .realign_o(realign_o), .miss_o(miss_o)
  );

  // ---------------- periodic correction ----------------
  phase_error_accum #(.EW(EW)) u_acc (
    .clk(clk), .rst_n(rst_n), .win_i(phase_win), .q_i(q_rx),
    .e_o(e_o), .valid_o(e_valid_o)
  );

  pd_controller #(.EW(EW), .FW(FW), .KW(KW), .KFRAC(KFRAC)) u_pdc (
    .clk(clk), .rst_n(rst_n), .init(pd_init), .f_init(sc_word),
    .update(pd_update), .e_i(e_last), .e_target(e_target), .kp(kp), .kd(kd),
    .f_ref_o(pd_word), .f_load_o(pd_load), .step_o(pd_step)
  );

  // ---------------- synthesizer word ----------------
  always_comb begin
    if (stage == ST_PERIODIC) begin
      freq_word_o = pd_word;
      freq_load_o = pd_load;
    end else begin
      freq_word_o = sc_word;
      freq_load_o = sc_load;
    end
  end

  logic unused;
  assign unused = ^{sc_busy, sc_diff, sc_tries, q_sd, acf, pd_step};

  initial assert (2 * PULSES < 2 ** EW) else $error("sync_rx: EW too narrow for 2*PULSES");

endmodule
