// sync_seq_gen -- transmitter (Alice) synchronization-sequence generator.
//
// Drives the synchronization laser one bit per 156.25 MHz cycle.  In
// TX_CONTINUOUS mode, used while the receiver runs its starting frequency
// correction, every cycle carries a pulse.  In TX_FRAMED mode it repeats the
// time-division frame of the periodic stage every T_REP cycles:
//
//   start_gap | sync_pulse | corr_data | payload | end_gap | quantum | guard
//   no pulses   PULSES x     127-bit    iteration  no pulses  quantum   idle
//               78.125 MHz   M sequence number,              window
//               (1010...)    at 156.25  MSB first
//
// The segment order, the 78.125 MHz pulses, the M sequence at the end of the
// sequence and the payload carrying the iteration number follow the published
// scheme; the gap lengths, the payload width and coding (one NRZ bit per
// cycle, MSB first) and the idle guard before the next frame are this
// design's choices.  A switch to TX_FRAMED starts a new frame at position 0.
//
// Timing: all outputs are registered and mutually aligned: in the cycle where
// `pos_o` shows frame position p, `laser_o` carries the bit of position p and
// `seg_o` its segment.  `qwin_o` is the quantum-state transmission window,
// `frame_start_o` marks position 0, `iter_o` is the iteration number sent in
// this frame's payload.
module sync_seq_gen
  import qkd_sync_pkg::*;
#(
  parameter int unsigned START_GAP = START_GAP_LEN,
  parameter int unsigned PULSES    = SYNC_PULSES,
  parameter int unsigned PBITS     = PAYLOAD_BITS,
  parameter int unsigned END_GAP   = END_GAP_LEN,
  parameter int unsigned GUARD     = QGUARD_LEN,
  parameter int unsigned T_REP     = T_REP_CYCLES,
  parameter int unsigned PW        = $clog2(T_REP)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  tx_mode_e         mode,
  output logic             laser_o,
  output seg_e             seg_o,
  output logic [PW-1:0]    pos_o,
  output logic             qwin_o,
  output logic             frame_start_o,
  output logic [PBITS-1:0] iter_o
);

  localparam frame_layout_t L =
      make_layout(START_GAP, PULSES, MSEQ_LEN, PBITS, END_GAP, GUARD, T_REP);

  logic [PW-1:0]    pos;
  logic [PBITS-1:0] iter;
  tx_mode_e         mode_q;
  seg_e             seg;
  logic             bit_d;
  logic             m_bit;
  logic [PW-1:0]    rel;

  // frame position counter; restarts when framed mode is entered
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos    <= '0;
      iter   <= '0;
      mode_q <= TX_CONTINUOUS;
    end else begin
      mode_q <= mode;
      if (mode != TX_FRAMED || mode_q != TX_FRAMED) begin
        pos <= '0;
      end else if (32'(pos) == L.rep - 1) begin
        pos  <= '0;
        iter <= iter + 1'b1;
      end else begin
        pos <= pos + 1'b1;
      end
    end
  end

  always_comb begin
    if      (32'(pos) < L.sync_start) seg = SEG_START_GAP;
    else if (32'(pos) < L.corr_start) seg = SEG_SYNC_PULSE;
    else if (32'(pos) < L.pay_start)  seg = SEG_CORR_DATA;
    else if (32'(pos) < L.egap_start) seg = SEG_PAYLOAD;
    else if (32'(pos) < L.q_start)    seg = SEG_END_GAP;
    else if (32'(pos) < L.q_end)      seg = SEG_QUANTUM;
    else                              seg = SEG_GUARD;
  end

  // M sequence copy: held at the seed outside corr_data, one step per bit in it
  mseq_lfsr u_lfsr (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (mode_q != TX_FRAMED || seg != SEG_CORR_DATA),
    .step    (mode_q == TX_FRAMED && seg == SEG_CORR_DATA),
    .bit_o   (m_bit),
    .state_o ()
  );

  assign rel = pos - PW'(L.sync_start);

  always_comb begin
    bit_d = 1'b0;
    if (mode_q != TX_FRAMED) begin
      bit_d = 1'b1;
    end else begin
      unique case (seg)
        SEG_SYNC_PULSE: bit_d = ~rel[0];
        SEG_CORR_DATA:  bit_d = m_bit;
        SEG_PAYLOAD:    bit_d = iter[PBITS - 1 - (32'(pos) - L.pay_start)];
        default:        bit_d = 1'b0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      laser_o       <= 1'b0;
      seg_o         <= SEG_START_GAP;
      pos_o         <= '0;
      qwin_o        <= 1'b0;
      frame_start_o <= 1'b0;
      iter_o        <= '0;
    end else begin
      laser_o       <= bit_d;
      seg_o         <= seg;
      pos_o         <= pos;
      qwin_o        <= (mode_q == TX_FRAMED) && (seg == SEG_QUANTUM);
      frame_start_o <= (mode_q == TX_FRAMED) && (pos == '0);
      iter_o        <= iter;
    end
  end

endmodule
