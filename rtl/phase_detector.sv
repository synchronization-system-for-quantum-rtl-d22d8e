// phase_detector -- one-flop phase detector of the periodic frequency
// correction, plus the transfer of its result and of the detected pulse
// train into the receiver clock domain.
//
// A two-input multiplexer selects constant 1 or constant 0 with the
// receiver's 156.25 MHz clock `rx_clk` as its select, and its output feeds
// the D input of a flip-flop clocked by the synchronization-detector signal
// `sd_i`.  At every detected pulse front the flop therefore records whether
// the receiver clock was high (Q = 1, a phase error) or low.  Passing the
// clock through the multiplexer rather than straight to D, the multiplexer
// and flop, and their roles follow the published circuit.  When the pulse
// front falls close to a receiver clock edge the flop may go metastable;
// together with jitter this turns the accumulated error into a smooth
// function of the phase, which the correction loop exploits.
//
// This design's additions: the same pulse fronts also flip a toggle flop,
// so that every detected pulse becomes one bit `bit_o` in the receiver
// domain (the stream the M-sequence correlator and payload reader use).
// Both Q and the toggle are taken over by a falling-edge flop of rx_clk and
// then a rising-edge flop; the loop locks the pulse fronts near a rising edge
// of rx_clk, so the falling-edge sample sits half a cycle away from them.
//
// Timing: for a pulse front just before or after rx_clk rising edge k,
// `bit_o` is high in the cycle after edge k+1 and `q_o` shows the pulse's
// phase error from edge k+1 until the next pulse's result arrives.
module phase_detector (
  input  logic sd_i,      // synchronization detector output (pulse fronts)
  input  logic sd_rst_n,  // reset in the sd_i domain
  input  logic rx_clk,    // receiver 156.25 MHz clock
  input  logic rx_rst_n,
  output logic q_sd,      // raw flip-flop output Q
  output logic q_o,       // Q in the receiver domain
  output logic bit_o      // one-cycle pulse per detected optical pulse
);

  logic d_mux;
  logic tog;
  logic q_n, tog_n;         // falling-edge samples
  logic q_p, tog_p, tog_pp; // rising-edge samples

  // multiplexer of the published circuit: rx_clk selects "1" or "0"
  assign d_mux = rx_clk ? 1'b1 : 1'b0;

  always_ff @(posedge sd_i or negedge sd_rst_n) begin
    if (!sd_rst_n) begin
      q_sd <= 1'b0;
      tog  <= 1'b0;
    end else begin
      q_sd <= d_mux;
      tog  <= ~tog;
    end
  end

  always_ff @(negedge rx_clk or negedge rx_rst_n) begin
    if (!rx_rst_n) {q_n, tog_n} <= 2'b00;
    else           {q_n, tog_n} <= {q_sd, tog};
  end

  always_ff @(posedge rx_clk or negedge rx_rst_n) begin
    if (!rx_rst_n) {q_p, tog_p, tog_pp} <= 3'b000;
    else           {q_p, tog_p, tog_pp} <= {q_n, tog_n, tog_p};
  end

  assign q_o   = q_p;
  assign bit_o = tog_p ^ tog_pp;

endmodule
