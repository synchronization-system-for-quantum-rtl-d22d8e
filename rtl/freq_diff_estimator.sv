// freq_diff_estimator -- first-stage (starting) frequency-difference
// measurement: finds N360, the number of receiver cycles between two moments
// where the receiver and transmitter clocks have slipped by one full cycle,
// and which of the two clocks leads.
//
// While the transmitter sends an uninterrupted 156.25 MHz pulse train, the
// detected pulses `sd_clk` serve as the transmitter clock.  Two dual-clock
// FIFOs are written and read continuously:
//   FIFO 1: written at the transmitter clock, read at the receiver clock;
//   FIFO 2: written at the receiver clock, read at the transmitter clock.
// Both read sides pop a word whenever one is available.  In the FIFO whose
// reader is faster, the stock runs down by one word per extra read cycle;
// once it is down to the last word, every further slip makes the "empty"
// flag rise for a cycle.  The receiver counts the rising edges of each
// FIFO's empty flag during `tau` receiver cycles and measures the distance
// between consecutive edges in receiver cycles.  The FIFO with more events
// names the leading clock (`rx_leads` = FIFO 1, the receiver reads faster),
// and N360 is the largest distance seen for that FIFO: taking the largest
// rejects the extra edges that jitter causes near a slip, and the interval
// before the first edge is never used because the start is random.  `valid`
// needs at least two events.  This scheme is the published one; the FIFO
// depth, counter widths and the decision by event count are this design's.
//
// Interface: a `start` pulse clears both FIFOs (CLR_CYCLES receiver cycles),
// then measures for `tau` cycles, ignoring the first WARMUP; `done` pulses for one cycle with the
// results, which hold until the next start.  `busy` is high in between.
module freq_diff_estimator #(
  parameter int unsigned AW         = 4,    // FIFO depth 2**AW
  parameter int unsigned CW         = 32,   // cycle-counter width
  parameter int unsigned EVW        = 16,   // event-counter width
  parameter int unsigned CLR_CYCLES = 8,
  parameter int unsigned WARMUP     = 16    // cycles ignored after the FIFOs start
) (
  input  logic           clk,       // receiver 156.25 MHz
  input  logic           rst_n,
  input  logic           sd_clk,    // detected transmitter pulses
  input  logic           start,
  input  logic [CW-1:0]  tau,
  output logic           busy,
  output logic           done,
  output logic           valid,
  output logic           rx_leads,
  output logic [CW-1:0]  n360,
  output logic [EVW-1:0] events1,
  output logic [EVW-1:0] events2
);

  typedef enum logic [1:0] {S_IDLE, S_CLR, S_RUN} state_e;
  state_e state;

  logic [CW-1:0] cnt;
  logic          fifo_rst_n;         // receiver-domain FIFO reset request
  logic          rx_fifo_rst_n, sd_fifo_rst_n;

  // ---------- control ----------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cnt        <= '0;
      fifo_rst_n <= 1'b0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state      <= S_CLR;
          cnt        <= '0;
          fifo_rst_n <= 1'b0;
        end
        S_CLR: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(CLR_CYCLES - 1)) begin
            state      <= S_RUN;
            cnt        <= '0;
            fifo_rst_n <= 1'b1;
          end
        end
        S_RUN: begin
          cnt <= cnt + 1'b1;
          if (cnt == tau - 1'b1) begin
            state      <= S_IDLE;
            fifo_rst_n <= 1'b0;
            done       <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // FIFO resets: assert at once, release on each domain's own clock
  rst_sync u_rrst (.clk(clk),    .arst_n(fifo_rst_n), .rst_n_o(rx_fifo_rst_n));
  rst_sync u_srst (.clk(sd_clk), .arst_n(fifo_rst_n), .rst_n_o(sd_fifo_rst_n));

  // ---------- the two FIFOs ----------
  logic       full1, empty1, full2, empty2;
  logic [7:0] wd1, wd2, rd1, rd2;

  always_ff @(posedge sd_clk or negedge sd_fifo_rst_n) begin
    if (!sd_fifo_rst_n) wd1 <= '0;
    else if (!full1)    wd1 <= wd1 + 1'b1;
  end
  always_ff @(posedge clk or negedge rx_fifo_rst_n) begin
    if (!rx_fifo_rst_n) wd2 <= '0;
    else if (!full2)    wd2 <= wd2 + 1'b1;
  end

  async_fifo #(.WIDTH(8), .AW(AW)) u_fifo1 (
    .wclk(sd_clk), .wrst_n(sd_fifo_rst_n), .winc(1'b1), .wdata(wd1), .full(full1),
    .rclk(clk),    .rrst_n(rx_fifo_rst_n), .rinc(1'b1), .rdata(rd1), .empty(empty1)
  );
  async_fifo #(.WIDTH(8), .AW(AW)) u_fifo2 (
    .wclk(clk),    .wrst_n(rx_fifo_rst_n), .winc(1'b1), .wdata(wd2), .full(full2),
    .rclk(sd_clk), .rrst_n(sd_fifo_rst_n), .rinc(1'b1), .rdata(rd2), .empty(empty2)
  );

  // ---------- empty-event detection ----------
  logic empty1_q, empty2_q, ev1, ev2_sd, ev2;

  always_ff @(posedge clk or negedge rx_fifo_rst_n) begin
    if (!rx_fifo_rst_n) empty1_q <= 1'b1;
    else                empty1_q <= empty1;
  end
  assign ev1 = empty1 && !empty1_q;

  always_ff @(posedge sd_clk or negedge sd_fifo_rst_n) begin
    if (!sd_fifo_rst_n) empty2_q <= 1'b1;
    else                empty2_q <= empty2;
  end
  assign ev2_sd = empty2 && !empty2_q;

  event_sync u_ev2 (
    .src_clk(sd_clk), .src_rst_n(sd_fifo_rst_n), .event_i(ev2_sd),
    .dst_clk(clk),    .dst_rst_n(rx_fifo_rst_n), .pulse_o(ev2)
  );

  // ---------- interval measurement, in receiver cycles ----------
  logic [CW-1:0] since1, since2, max1, max2;
  logic          run;
  // the first words through an empty FIFO raise "empty" once or twice
  // before the read side settles; those edges are not slips
  assign run = (state == S_RUN) && (cnt >= CW'(WARMUP));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      since1 <= '0; since2 <= '0; max1 <= '0; max2 <= '0;
      events1 <= '0; events2 <= '0;
    end else if (state == S_CLR) begin
      since1 <= '0; since2 <= '0; max1 <= '0; max2 <= '0;
      events1 <= '0; events2 <= '0;
    end else if (run) begin
      since1 <= ev1 ? CW'(1) : since1 + 1'b1;
      since2 <= ev2 ? CW'(1) : since2 + 1'b1;
      if (ev1) begin
        if (events1 != '1) events1 <= events1 + 1'b1;
        if (events1 != '0 && since1 > max1) max1 <= since1;
      end
      if (ev2) begin
        if (events2 != '1) events2 <= events2 + 1'b1;
        if (events2 != '0 && since2 > max2) max2 <= since2;
      end
    end
  end

  assign rx_leads = (events1 >= events2);
  assign n360     = rx_leads ? max1 : max2;
  assign valid    = rx_leads ? (events1 >= EVW'(2)) : (events2 >= EVW'(2));

  logic unused;
  assign unused = ^{rd1, rd2};

endmodule
