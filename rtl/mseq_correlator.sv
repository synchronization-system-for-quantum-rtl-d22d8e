// mseq_correlator -- sliding correlator that finds the 127-bit M sequence in
// the received synchronization bit stream.
//
// The last 127 received bits sit in a shift register.  Each cycle they are
// multiplied bit by bit (AND) with the receiver's copy of the M sequence and
// the products are summed: an unnormalized correlation of 0/1 values, whose
// peak, when the received window equals the sequence, is its number of ones,
// ceil(127/2) = 64.  A peak is declared when the sum reaches the threshold
// `r_th`; a threshold below 64 tolerates lost or spurious pulses.  The method
// and the 0/1 arithmetic are the published ones; the threshold value is a
// run-time input because none is given.  Note that a run of 127 ones also
// sums to 64, which is why the pulses before the sequence run at half rate.
//
// Timing: `bit_i` is shifted in on every rising edge.  `acf_o` and `peak_o`
// are combinational and refer to the window that ends with the bit shifted
// in on the last edge, so `peak_o` is high in the cycle where `bit_i`
// already carries the first bit after the sequence.  `en` gates `peak_o`.
module mseq_correlator
  import qkd_sync_pkg::*;
#(
  parameter logic [MSEQ_DEG-1:0] SEED = MSEQ_SEED
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bit_i,
  input  logic       en,
  input  logic [6:0] r_th,
  output logic [6:0] acf_o,
  output logic       peak_o
);

  // sr[0] is the newest bit, sr[126] the oldest; a full match has
  // sr[126 - i] == s[i], so the reference is the sequence reversed.
  localparam logic [MSEQ_LEN-1:0] S = mseq_period(SEED);

  function automatic logic [MSEQ_LEN-1:0] reverse_bits(logic [MSEQ_LEN-1:0] v);
    logic [MSEQ_LEN-1:0] r;
    for (int i = 0; i < MSEQ_LEN; i++) r[i] = v[MSEQ_LEN-1-i];
    return r;
  endfunction

  localparam logic [MSEQ_LEN-1:0] REF = reverse_bits(S);

  logic [MSEQ_LEN-1:0] sr;
  logic [MSEQ_LEN-1:0] prod;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else        sr <= {sr[MSEQ_LEN-2:0], bit_i};
  end

  assign prod = sr & REF;

  always_comb begin
    acf_o = '0;
    for (int i = 0; i < MSEQ_LEN; i++) acf_o = acf_o + 7'(prod[i]);
  end

  assign peak_o = en && (acf_o >= r_th);

endmodule
