// qkd_sync_pkg -- constants and types shared by the transmitter (Alice) and
// receiver (Bob) halves of the QKD synchronization system.
//
// All timing is counted in cycles of the 156.25 MHz working clock (6.4 ns),
// which both nodes derive from their own synthesizer.  The synchronization
// frame repeats every T_rep = 3.2 ms = 500 000 cycles and the periodic
// frequency correction runs every T_corr = 50 ms = 7 812 500 cycles; both
// periods, the 5000-pulse sync_pulse segment, the 127-bit M sequence and the
// 200 MHz synthesizer reference follow the published system.  The lengths of
// start_gap, payload, end_gap and the guard after the quantum window, and the
// micro-hertz unit of the frequency word, are this design's own choices.
package qkd_sync_pkg;

  // Working clock and synthesizer reference
  localparam longint unsigned F_REF_UHZ   = 64'd200_000_000_000_000; // 200 MHz in uHz
  localparam int              FW          = 48;  // signed frequency-offset word, uHz

  // Frame (one synchronization sequence plus one quantum window), cycles
  localparam int T_REP_CYCLES   = 500_000;   // 3.2 ms at 156.25 MHz
  localparam int START_GAP_LEN  = 1_000;     // own choice
  localparam int SYNC_PULSES    = 5_000;     // 78.125 MHz pulses in sync_pulse
  localparam int MSEQ_LEN       = 127;       // one period of the 7-stage M sequence
  localparam int PAYLOAD_BITS   = 32;        // iteration number, own width
  localparam int END_GAP_LEN    = 2_000;     // own choice
  localparam int QGUARD_LEN     = 1_000;     // idle tail before next frame, own choice

  // Periodic correction period, cycles
  localparam int T_CORR_CYCLES  = 7_812_500; // 50 ms at 156.25 MHz

  // M sequence: P(x) = 1 + x^3 + x^7, seed all ones
  localparam int          MSEQ_DEG  = 7;
  localparam logic [6:0]  MSEQ_SEED = 7'h7F;

  // One period of the M sequence, bit i = s[i] (s[0] is sent first),
  // produced by the same recurrence as mseq_lfsr.
  function automatic logic [MSEQ_LEN-1:0] mseq_period(logic [MSEQ_DEG-1:0] seed);
    logic [MSEQ_DEG-1:0] r;
    logic [MSEQ_LEN-1:0] s;
    r = seed;
    for (int i = 0; i < MSEQ_LEN; i++) begin
      s[i] = r[0];
      r    = {r[0] ^ r[3], r[MSEQ_DEG-1:1]};
    end
    return s;
  endfunction

  // Segment of the synchronization frame
  typedef enum logic [2:0] {
    SEG_START_GAP,
    SEG_SYNC_PULSE,
    SEG_CORR_DATA,
    SEG_PAYLOAD,
    SEG_END_GAP,
    SEG_QUANTUM,
    SEG_GUARD
  } seg_e;

  // Transmitter mode: continuous 156.25 MHz pulses for the starting
  // correction, or the framed TDM sequence of the periodic stage.
  typedef enum logic {
    TX_CONTINUOUS = 1'b0,
    TX_FRAMED     = 1'b1
  } tx_mode_e;

  // Frame layout for a given set of segment lengths: start position of each
  // segment.  Frame position 0 is the first cycle of start_gap.
  typedef struct packed {
    int unsigned sync_start;
    int unsigned corr_start;
    int unsigned pay_start;
    int unsigned egap_start;
    int unsigned q_start;
    int unsigned q_end;      // first cycle after the quantum window
    int unsigned rep;        // frame length
  } frame_layout_t;

  function automatic frame_layout_t make_layout(
      int unsigned start_gap, int unsigned pulses, int unsigned mlen,
      int unsigned pbits, int unsigned egap, int unsigned guard,
      int unsigned rep);
    frame_layout_t l;
    l.sync_start = start_gap;
    l.corr_start = l.sync_start + 2 * pulses;
    l.pay_start  = l.corr_start + mlen;
    l.egap_start = l.pay_start + pbits;
    l.q_start    = l.egap_start + egap;
    l.q_end      = rep - guard;
    l.rep        = rep;
    return l;
  endfunction

endpackage
