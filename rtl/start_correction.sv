// start_correction -- first stage of the two-stage frequency-difference
// correction, run once when the receiver starts.
//
// The receiver first detunes its synthesizer reference by the intentional
// offset `df_const`, which makes the clock slips frequent so that a short
// evaluation time tau suffices.  After a settling wait it lets
// freq_diff_estimator measure N360, the receiver cycles between slips, and
// which clock leads.  With fewer than two slips in tau the measurement is
// repeated with tau doubled, up to MAX_TRIES measurements.  The relative
// frequency difference is 1/N360 for every frequency derived from the
// reference, so the reference-frequency difference is F_REF_UHZ / N360 (a
// sequential divider forms it) and the word is corrected by that amount,
// downwards if the receiver leads.  The intentional offset is thereby
// removed too, since the measurement includes it.  This sequence is the
// published method; the settling wait, the retry limit and the number
// formats are this design's.
//
// Interface: `start` runs the stage from the word `f_base`.  `freq_word_o`
// and the one-cycle `freq_load_o` go to the synthesizer (signed offset from
// the nominal 200 MHz reference, in uHz).  `done_o` pulses when the
// corrected word has been issued, `fail_o` when every try saw too few slips.
// `diff_o` is the measured receiver-minus-transmitter difference in uHz.
module start_correction
  import qkd_sync_pkg::*;
#(
  parameter int unsigned AW        = 4,
  parameter int unsigned CW        = 32,
  parameter int unsigned SETTLE    = 64,
  parameter int unsigned MAX_TRIES = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sd_clk,
  input  logic                 start,
  input  logic signed [FW-1:0] f_base,
  input  logic signed [FW-1:0] df_const,
  input  logic        [CW-1:0] tau0,
  output logic signed [FW-1:0] freq_word_o,
  output logic                 freq_load_o,
  output logic                 busy_o,
  output logic                 done_o,
  output logic                 fail_o,
  output logic signed [FW-1:0] diff_o,
  output logic        [CW-1:0] n360_o,
  output logic                 rx_leads_o,
  output logic        [3:0]    tries_o
);

  typedef enum logic [2:0] {S_IDLE, S_SETTLE, S_MEAS, S_WAIT, S_DIV, S_DIVWAIT} state_e;
  state_e state;

  logic [CW-1:0] tau, cnt;
  logic          est_start, est_busy, est_done, est_valid, est_rx_leads;
  logic [CW-1:0] est_n360;
  logic [15:0]   ev1, ev2;
  logic          div_start, div_busy, div_done;
  logic [63:0]   quot;

  freq_diff_estimator #(.AW(AW), .CW(CW)) u_est (
    .clk(clk), .rst_n(rst_n), .sd_clk(sd_clk),
    .start(est_start), .tau(tau),
    .busy(est_busy), .done(est_done), .valid(est_valid),
    .rx_leads(est_rx_leads), .n360(est_n360), .events1(ev1), .events2(ev2)
  );

  seq_divider #(.NW(64), .DW(CW)) u_div (
    .clk(clk), .rst_n(rst_n), .start(div_start),
    .dividend(F_REF_UHZ), .divisor(n360_o),
    .busy(div_busy), .done(div_done), .quotient(quot)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      tau         <= '0;
      cnt         <= '0;
      freq_word_o <= '0;
      freq_load_o <= 1'b0;
      done_o      <= 1'b0;
      fail_o      <= 1'b0;
      diff_o      <= '0;
      n360_o      <= '0;
      rx_leads_o  <= 1'b0;
      tries_o     <= '0;
      est_start   <= 1'b0;
      div_start   <= 1'b0;
    end else begin
      freq_load_o <= 1'b0;
      done_o      <= 1'b0;
      fail_o      <= 1'b0;
      est_start   <= 1'b0;
      div_start   <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          freq_word_o <= f_base + df_const;
          freq_load_o <= 1'b1;
          tau         <= tau0;
          tries_o     <= '0;
          cnt         <= '0;
          state       <= S_SETTLE;
        end
        S_SETTLE: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(SETTLE - 1)) state <= S_MEAS;
        end
        S_MEAS: begin
          est_start <= 1'b1;
          tries_o   <= tries_o + 1'b1;
          state     <= S_WAIT;
        end
        S_WAIT: if (est_done) begin
          if (est_valid) begin
            n360_o     <= est_n360;
            rx_leads_o <= est_rx_leads;
            state      <= S_DIV;
          end else if (32'(tries_o) < MAX_TRIES) begin
            tau   <= tau << 1;
            state <= S_MEAS;
          end else begin
            fail_o <= 1'b1;
            state  <= S_IDLE;
          end
        end
        S_DIV: begin
          div_start <= 1'b1;
          state     <= S_DIVWAIT;
        end
        S_DIVWAIT: if (div_done) begin
          diff_o      <= rx_leads_o ? FW'(quot) : -FW'(quot);
          freq_word_o <= rx_leads_o ? freq_word_o - FW'(quot) : freq_word_o + FW'(quot);
          freq_load_o <= 1'b1;
          done_o      <= 1'b1;
          state       <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy_o = (state != S_IDLE);

  logic unused;
  assign unused = ^{est_busy, div_busy, ev1, ev2};

endmodule
