// optical_channel_model -- behavioural model (not synthesizable) of the
// synchronization path: laser driven by the transmitter, fiber with a fixed
// delay, and synchronization detector.
//
// For every transmitter cycle whose laser bit is 1, a pulse of WIDTH_PS
// appears on `sd` DELAY_PS after the transmitter clock edge, shifted by a
// uniformly distributed jitter of +/-JITTER_PS.  `drop_every`, when not 0,
// suppresses every n-th pulse, to mimic lost pulses.
`timescale 1ps/1fs
module optical_channel_model #(
  parameter real DELAY_PS  = 20000.0,
  parameter real WIDTH_PS  = 1600.0,
  parameter int  JITTER_PS = 25
) (
  input  logic tx_clk,
  input  logic laser,
  input  int   drop_every,
  output logic sd
);
  int n = 0;
  initial sd = 1'b0;

  always @(posedge tx_clk) begin
    if (laser) begin
      n++;
      if (drop_every == 0 || (n % drop_every) != 0) begin
        automatic real j = real'(int'($urandom_range(2 * JITTER_PS * 10, 0)) - JITTER_PS * 10) / 10.0;
        fork
          begin
            #(DELAY_PS + j) sd = 1'b1;
            #(WIDTH_PS)     sd = 1'b0;
          end
        join_none
      end
    end
  end
endmodule
