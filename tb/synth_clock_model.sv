// synth_clock_model -- behavioural model (not synthesizable) of a node's
// clock source: reference oscillator plus frequency synthesizer producing the
// 156.25 MHz working clock.
//
// The clock runs at NOMINAL_PS period scaled by (1 + err_rel + word/F_REF),
// where err_rel is the oscillator's own relative error and `word` the
// synthesizer reference offset in uHz from the nominal 200 MHz, taken on
// `load`.  The new frequency applies from the next half period; the real
// synthesizer's settling behaviour is not modelled.  `phase0_ps` delays the
// first edge.  Edge times are accumulated as real numbers and each delay is
// taken from the ideal next edge time, so rounding to the time precision
// does not add up: the mean frequency is exact even for offsets far below
// one time-precision step per half period.
`timescale 1ps/1fs
module synth_clock_model #(
  parameter real NOMINAL_PS = 6400.0,
  parameter real F_REF_UHZ  = 200.0e12
) (
  input  real                err_rel,
  input  real                phase0_ps,
  input  logic               load,
  input  logic signed [47:0] word,
  output logic               clk
);
  real rel_word = 0.0;

  always @(posedge clk) if (load) rel_word = real'(word) / F_REF_UHZ;

  real t_next;

  initial begin
    clk = 1'b0;
    t_next = phase0_ps;
    #(phase0_ps);
    forever begin
      t_next = t_next + NOMINAL_PS / 2.0 / (1.0 + err_rel + rel_word);
      #(t_next - $realtime) clk = ~clk;
    end
  end
endmodule
