# Clock and window synchronization for a QKD link

Two quantum key distribution nodes, a transmitter (Alice) and a receiver
(Bob), each run from their own crystal oscillator and frequency synthesizer.
Single photons are only useful if Bob opens his detection window at the
instant Alice's photon arrives. So Bob's clock must keep a fixed phase to
Alice's, and Bob must know where each of Alice's frames starts. This design
does both over the optical line itself, with no separate clock fiber. Alice
time-multiplexes a synchronization sequence of laser pulses into the channel.
From the pulses seen by its synchronization detector, Bob's logic:

1. measures and removes the gross frequency difference at start-up
   (*starting correction*);
2. keeps the phase of its clock on a fixed point relative to Alice's pulses
   with a PD controller (*periodic correction*);
3. finds the frame boundary by correlating against a known 127-bit M sequence
   and places its quantum receive window to match Alice's transmit window
   (*window alignment*).

Bob acts on his own clock by writing a signed frequency offset (in µHz) for
the 200 MHz reference of a programmable synthesizer. All logic runs at
156.25 MHz, one cycle = 6.4 ns.

## The frame

After start-up Alice repeats one frame every T_rep = 500 000 cycles (3.2 ms):

| segment    | length (cycles, default) | content |
|------------|--------------------------|---------|
| start_gap  | 1 000                    | laser off; lets the laser settle |
| sync_pulse | 2 × 5 000                | 5 000 pulses at 78.125 MHz (one every second cycle) |
| corr_data  | 127                      | one period of the M sequence, one bit per cycle |
| payload    | 32                       | Alice's frame (iteration) number, MSB first |
| end_gap    | 2 000                    | laser off; lets reflections die out |
| quantum    | up to T_rep − 1 000      | photon transmit / receive window |
| guard      | 1 000                    | idle tail |

The 3.2 ms frame, the 5 000 pulses, the 78.125 MHz pulse rate and the 127-bit
sequence follow the published system. The lengths of start_gap, payload,
end_gap and guard are this design's own choices. They are parameters, and
Alice and Bob must use the same values. `qkd_sync_pkg::make_layout` turns
the lengths into segment start positions.

The sync pulses run at half the clock rate for two reasons:

- Every pulse then spans two of Bob's clock edges, so it is never lost, even
  though it comes from a different clock.
- A 156.25 MHz train would look to the correlator exactly like the M sequence
  (see below).

## Stage 1: starting correction (`start_correction`, `freq_diff_estimator`)

At start-up Alice sends a pulse every cycle (`tx_mode = TX_CONTINUOUS`). Bob
uses the detector output `sd_i` directly as a clock for Alice's side.

Two dual-clock FIFOs are cross-connected:

- FIFO 1 is written by the detector clock and read by Bob's clock.
- FIFO 2 is the reverse.

Both are written and read every cycle. Whichever side reads faster drains
its FIFO. From then on, that FIFO's `empty` flag pulses once every time the
faster clock gains a full cycle, i.e. once per 360° slip. The number of Bob's
cycles between two such pulses is N360. The frequency difference is
f_ref / N360, and the FIFO that empties tells which clock leads.

The sequence in `start_correction` is:

1. Load `f_base + df_const`. The intentional offset `df_const` makes slips
   frequent, so the measurement stays short even when the two oscillators
   happen to be very close.
2. Wait `SETTLE` cycles for the synthesizer.
3. Measure for `tau` cycles. The first `WARMUP` cycles are ignored while the
   FIFOs drain.
4. If fewer than two slips were seen, double `tau` and measure again, up to
   `MAX_TRIES` times. Otherwise take the largest interval between consecutive
   slips as N360; the first partial interval is always shorter.
5. Divide 200 MHz (in µHz) by N360 with a sequential 64/32 divider. Subtract
   the quotient if Bob leads, or add it if Alice leads. Load the result.

Accuracy: N360 can only be read to within roughly (detector jitter)/(drift
per cycle) cycles. The remaining relative error is therefore about
jitter × (df_const / f) / 6.4 ns. A smaller `df_const` means a longer but
more precise measurement. In simulation, 25 ps of jitter with a 1e-4 offset
leaves a few times 1e-8 to 1e-7, and 10 ps with 1e-5 leaves a few times 1e-9.

## Stage 2: phase detector and PD loop

`phase_detector` is the core trick. A multiplexer driven by Bob's clock
selects constant 1 or 0. A flip-flop clocked by the detector pulse samples
the multiplexer output. So Q = 1 when Alice's pulse arrives while Bob's clock
is high. The constants, not the clock itself, go to D, which keeps the
flip-flop's data input clean.

Near Bob's clock edge, jitter and metastability make Q random. The fraction
of ones then changes smoothly with the phase. Q is moved into Bob's domain
by a falling-edge flop and then a rising-edge flop.

`phase_error_accum` counts Q on every Bob cycle inside the sync_pulse window:

- 0 means Alice's pulses all land while Bob's clock is low.
- 2 × 5 000 = 10 000 means they all land while it is high.
- Values in between mean the pulses land on Bob's clock edge.

Every T_corr = 7 812 500 cycles (50 ms), `sync_rx` gives the latest finished
count e(n) to `pd_controller`:

    f(n) = f(n-1) - floor( (Kp·(e(n) - e_target) + Kd·(e(n) - e(n-1))) / 2^8 )

- `Kp` and `Kd` are unsigned with 8 fraction bits, in µHz per count.
- The sum is formed exactly and only then shifted.
- D is zero on the first iteration.
- Pick `e_target` around half the maximum. That keeps the phase on the slope
  of the detector, where e tracks the phase.

The published system states no gains, target or threshold. All of them are
run-time inputs here.

The loop can only catch the phase if the drift between two corrections is
well below one clock period. With T_corr = 50 ms this needs a stage-1 error
well below 1e-7, a few ×1e-8 or better. The reduced-size testbenches show the
loop settling. They use a 2 000- or 6 000-cycle correction period, and the
loop settles within a few hundred iterations. It then follows a 5e-7 step in
Alice's oscillator to within 1 %.

Choosing gains: let S be the detector slope in counts per ps. S is about
2·pulses / (peak-to-peak jitter), since e goes from 0 to 2·pulses across the
jitter band. Write the two gains in phase terms, as the phase correction per
ps of phase error:

- Gp = (Kp / 256) · S · T_corr / 200 MHz
- Gd = (Kd / 256) · S · T_corr / 200 MHz

with the word's µHz expressed as a relative frequency. While the phase stays
on the slope, the loop obeys

    z² − (2 − Gp − Gd)·z + (1 − Gd) = 0

It is stable for small positive Gp with Gd below 1, and Gp = Gd = 1 settles
in two steps. Off the slope, e saturates at 0 or at the maximum. The P term
then changes the word by only Kp/256 · pulses per update. If the leftover
stage-1 error makes the phase slide by more than a fraction of a clock
period per T_corr, the phase keeps wrapping and the loop does not capture.
In one simulation at the default sizes, a 1.6e-9 leftover error (80 ps per
50 ms) with Kp = Kd = 2048 showed exactly this over 14 updates. The
reduced-size testbenches capture because their drift per update is a few ps.

## Window alignment (`mseq_correlator`, `rx_frame_timer`)

`mseq_lfsr` produces the sequence from P(x) = 1 + x³ + x⁷. It uses the
recurrence s[n+7] = s[n] ⊕ s[n+3], seeded with all ones, so 64 of the 127
bits are ones.

Bob's correlator works as follows:

- It shifts each received bit (one per cycle) into a 127-bit window.
- It ANDs the window with a fixed copy of the sequence and counts the ones.
- It reports a peak when the count reaches `r_th`. The maximum is 64; a
  threshold below 64 tolerates a few corrupted bits.

On a peak, `rx_frame_timer` loads its frame position with the payload start
position. This is the position Alice had one cycle after sending the last
sequence bit. From then on, Bob's counter runs in step with Alice's, shifted
by the line delay. So any fiber length works without configuration. The same
counter produces the phase-error window, the payload shift register and the
quantum receive window `qwin_o`.

Behaviour this design adds (not from the published system):

- **Search window after lock.** Once locked, peaks are accepted only within
  ±`SEARCH` cycles of the expected position. An accepted peak re-aligns the
  counter.
- **Loss of lock.** `MISS_LIMIT` frames in a row without a peak drop the lock.
- **Arming.** Search is armed only after 127 consecutive cycles without a
  pulse. A solid pulse train ANDed with the reference also counts 64, the
  same as a true match. Without arming, the tail of the stage-1 pulse train
  would lock the timer at a random place.

## Module map

| module | role |
|--------|------|
| `qkd_sync_pkg` | constants (frame sizes, T_corr, 200 MHz in µHz), segment and mode enums, `make_layout`, `mseq_period` |
| `qkd_sync_top` | Alice's `sync_seq_gen` and Bob's `sync_rx` side by side; laser, detector and synthesizer are ports |
| `sync_seq_gen` | Alice: continuous pulses or the framed sequence; frame position, quantum window, iteration number |
| `mseq_lfsr` | 7-stage M-sequence generator |
| `sync_rx` | Bob: stage sequencing (idle → starting → periodic), T_corr timer, word multiplexing |
| `start_correction` | stage-1 controller with retry and division |
| `freq_diff_estimator` | cross-clocked FIFOs, slip counting, N360 and leading clock |
| `async_fifo` | Gray-pointer dual-clock FIFO with registered empty/full |
| `seq_divider` | restoring divider, one quotient bit per cycle |
| `phase_detector` | mux + flip-flop detector, toggle-based pulse bit, transfer to Bob's domain |
| `phase_error_accum` | windowed Q counter |
| `pd_controller` | PD update of the frequency word |
| `mseq_correlator` | 127-bit AND/popcount correlator with threshold |
| `rx_frame_timer` | frame position, windows, payload, lock/miss |
| `rst_sync`, `event_sync` | reset and single-pulse clock-domain crossing |

Interface notes:

- `freq_word_o` is the signed offset from 200 MHz in µHz. It is valid when
  `freq_load_o` pulses. Converting it into synthesizer register writes is
  chip-specific and left outside.
- `tx_mode` is an input. How Alice learns that Bob's stage 1 has finished is
  not part of the design; `start_done_o` is available to drive it.

## Timing summary

- Alice's outputs are registered. `laser_o` carries the bit for the frame
  position shown on `tx_pos_o` in the same cycle.
- Stage 1 takes SETTLE + Σ tau + about 70 cycles for the division.
- `payload_valid_o` pulses when the payload segment ends, with the word on `payload_o`.
- A PD update appears on `freq_word_o` one cycle after `pd_update_o`.
- The correlator output is combinational from the window register.

## Simulation

Behavioural models in `tb/`:

- `synth_clock_model` is a clock whose period follows the frequency word and
  a fixed oscillator error.
- `optical_channel_model` turns each laser bit into a detector pulse after a
  fixed delay, with uniform jitter. It can also drop pulses.

Each block has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. Build and run one with, for example:

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
      --top-module tb_qkd_sync_top -y rtl -y tb +libext+.sv -Irtl \
      rtl/qkd_sync_pkg.sv tb/tb_qkd_sync_top.sv
    ./obj_dir/Vtb_qkd_sync_top +verilator+rand+reset+2

The system-level testbenches:

- **`tb_qkd_sync_top`** runs the complete system with a 2 000-cycle frame,
  200 sync pulses and a correction every frame. It covers:
  - a stage-1 retry and the stage-1 correction;
  - lock, payloads, PD updates checked against the control law, and the
    phase settling on the slope;
  - a blanked channel causing missed frames, loss of lock and relock.

  It counts each of these and fails if any never happens.
- **`tb_sync_rx`** runs Bob alone with Alice leading during stage 1 and a
  correction period of three frames. It also checks the update interval.
  Then it steps Alice's oscillator by 5e-7 and checks that the mean word
  follows by 100 000 000 µHz within 10 % and that the phase settles again.
- **`tb_qkd_sync_full`** runs the top at its default sizes over a 100 km line
  (490 µs of delay): stage 1 with a retry, lock, payloads, 485 841-cycle
  receive windows offset by the line delay, and three 50 ms PD updates. It
  takes about a minute of simulation time on a desktop. Each 50 ms update
  costs about 17 s of simulation time, so it does not wait for the loop to
  settle (see "Choosing gains").

## Limits and departures

- No logic for the optics: laser driver, detector, attenuator, filters,
  fiber, BB84 state preparation and single-photon detection.
- No synthesizer: no reference oscillator, no synthesizer chip and no
  register programming of the chip.
- The metastable behaviour of the real detector flip-flop is modelled only
  through jitter in the channel model.
- Own choices: the frequency-word unit and width, the gains' fixed-point
  format, the segment lengths listed above, tau doubling with a retry limit,
  FIFO depth 16, and the search window, arming and loss-of-lock rules.
- The only phase error the PD loop sees is the most recent complete frame at
  each T_corr tick. The 15 or so measured in between are not averaged.
