// rx_frame_timer -- receiver (Bob) frame timing: aligns the receiver's copy
// of the transmitter frame to the detected M sequence and derives the
// receiver windows from it.
//
// The transmitter's frame layout (segment lengths in 156.25 MHz cycles) is
// known to the receiver.  When the correlator reports the M-sequence peak,
// the bit now arriving is the first payload bit, so the receiver frame
// position is set to the payload start; from there it counts the same cycle
// numbers as the transmitter, which places the quantum-state receive window
// after end_gap, delayed by the channel exactly as the sequence was.  This
// is the published alignment method.  This design's choices: once aligned,
// peaks are only accepted within +/-SEARCH cycles of the expected position
// (re-aligning on each), and after MISS_LIMIT frames in a row without a
// peak the timer falls back to searching the whole frame.  Search is armed
// only after ARM_ZEROS consecutive cycles without a pulse: until then the
// correlator window may still hold the uninterrupted pulse train of the
// starting correction, whose all-ones content gives the full ACF of 64.
//
// Derived outputs, all for the bit currently on `bit_i`:
//   pos_o        receiver frame position (0 = first cycle of start_gap)
//   phase_win_o  the sync_pulse segment: phase-error calculation window
//   sync_win_o   the whole synchronization sequence incl. end_gap
//   qwin_o       quantum-state receive window
//   payload_o    the iteration number read from the payload (MSB first),
//                with `payload_valid_o` pulsing the cycle after its last bit
//   realign_o    a peak was accepted this cycle;  miss_o  a frame lacked one
module rx_frame_timer
  import qkd_sync_pkg::*;
#(
  parameter int unsigned START_GAP  = START_GAP_LEN,
  parameter int unsigned PULSES     = SYNC_PULSES,
  parameter int unsigned PBITS      = PAYLOAD_BITS,
  parameter int unsigned END_GAP    = END_GAP_LEN,
  parameter int unsigned GUARD      = QGUARD_LEN,
  parameter int unsigned T_REP      = T_REP_CYCLES,
  parameter int unsigned SEARCH     = 16,
  parameter int unsigned MISS_LIMIT = 3,
  parameter int unsigned ARM_ZEROS  = MSEQ_LEN,
  parameter int unsigned PW         = $clog2(T_REP)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic             bit_i,
  input  logic             peak_i,
  output logic             corr_en_o,
  output logic             locked_o,
  output logic [PW-1:0]    pos_o,
  output logic             phase_win_o,
  output logic             sync_win_o,
  output logic             qwin_o,
  output logic [PBITS-1:0] payload_o,
  output logic             payload_valid_o,
  output logic             realign_o,
  output logic             miss_o
);

  localparam frame_layout_t L =
      make_layout(START_GAP, PULSES, MSEQ_LEN, PBITS, END_GAP, GUARD, T_REP);

  logic [PW-1:0]    pos_q, cur_pos;
  logic             seen, accept;
  logic [3:0]       misses;
  logic [PBITS-1:0] pay_sr;
  logic             armed;
  logic [$clog2(ARM_ZEROS+1)-1:0] zrun;

  // arm the search after a pulse-free run as long as the correlator window
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed <= 1'b0;
      zrun  <= '0;
    end else if (!enable) begin
      armed <= 1'b0;
      zrun  <= '0;
    end else if (!armed) begin
      zrun <= bit_i ? '0 : zrun + 1'b1;
      if (32'(zrun) == ARM_ZEROS - 1 && !bit_i) armed <= 1'b1;
    end
  end

  assign corr_en_o = enable && armed && (!locked_o ||
                     (32'(pos_q) + SEARCH >= L.pay_start && 32'(pos_q) <= L.pay_start + SEARCH));
  assign accept    = peak_i && corr_en_o;
  assign cur_pos   = accept ? PW'(L.pay_start) : pos_q;
  assign realign_o = accept;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_q           <= '0;
      locked_o        <= 1'b0;
      seen            <= 1'b0;
      misses          <= '0;
      miss_o          <= 1'b0;
      pay_sr          <= '0;
      payload_o       <= '0;
      payload_valid_o <= 1'b0;
    end else if (!enable) begin
      locked_o        <= 1'b0;
      seen            <= 1'b0;
      misses          <= '0;
      miss_o          <= 1'b0;
      payload_valid_o <= 1'b0;
    end else begin
      miss_o          <= 1'b0;
      payload_valid_o <= 1'b0;
      pos_q <= (32'(cur_pos) == L.rep - 1) ? '0 : cur_pos + 1'b1;

      if (accept) begin
        locked_o <= 1'b1;
        seen     <= 1'b1;
        misses   <= '0;
      end else if (locked_o && 32'(pos_q) == L.pay_start + SEARCH) begin
        if (!seen) begin
          miss_o <= 1'b1;
          if (32'(misses) + 1 >= MISS_LIMIT) begin
            locked_o <= 1'b0;
            misses   <= '0;
          end else begin
            misses <= misses + 1'b1;
          end
        end
        seen <= 1'b0;
      end

      if ((locked_o || accept) &&
          32'(cur_pos) >= L.pay_start && 32'(cur_pos) < L.egap_start) begin
        pay_sr <= {pay_sr[PBITS-2:0], bit_i};
        if (32'(cur_pos) == L.egap_start - 1) begin
          payload_o       <= {pay_sr[PBITS-2:0], bit_i};
          payload_valid_o <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    pos_o       = cur_pos;
    phase_win_o = locked_o && 32'(cur_pos) >= L.sync_start && 32'(cur_pos) < L.corr_start;
    sync_win_o  = locked_o && 32'(cur_pos) <  L.q_start;
    qwin_o      = locked_o && 32'(cur_pos) >= L.q_start && 32'(cur_pos) < L.q_end;
  end

endmodule
