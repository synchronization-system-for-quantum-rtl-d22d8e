// mseq_lfsr -- 7-stage Fibonacci LFSR producing the 127-bit M sequence used to
// mark the start of each data-exchange cycle.
//
// The feedback polynomial is P(x) = 1 + x^3 + x^7, as in the published system:
// the register holds s[n..n+6] with s[n] in bit 0 and advances by
// s[n+7] = s[n] ^ s[n+3].  The seed (all ones) is this design's choice; the
// transmitter and receiver copies must use the same seed.
//
// Interface: `load` restarts the sequence at the seed, `step` advances one
// bit.  `bit_o` is the current sequence bit s[n]; `state_o` the whole
// register.  Both change on the clock edge that sees load or step.  The
// sequence repeats every 127 steps and holds 64 ones and 63 zeros.
module mseq_lfsr
  import qkd_sync_pkg::*;
#(
  parameter logic [MSEQ_DEG-1:0] SEED = MSEQ_SEED
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic                step,
  output logic                bit_o,
  output logic [MSEQ_DEG-1:0] state_o
);

  logic [MSEQ_DEG-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sr <= SEED;
    else if (load)   sr <= SEED;
    else if (step)   sr <= {sr[0] ^ sr[3], sr[MSEQ_DEG-1:1]};
  end

  assign bit_o   = sr[0];
  assign state_o = sr;

  initial assert (SEED != '0) else $error("mseq_lfsr: all-zero seed locks the LFSR");

endmodule
