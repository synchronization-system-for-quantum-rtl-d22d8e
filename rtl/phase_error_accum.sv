// phase_error_accum -- accumulated phase error of one synchronization
// sequence.
//
// On every rising edge of the receiver clock inside the calculation window
// `win_i`, the counter adds the phase-detector output `q_i`.  The
// sync_pulse segment runs at 78.125 MHz, so each pulse's result is seen on
// two receiver edges and a sequence of N pulses gives an error between 0 and
// 2N (10 000 for the published 5000 pulses).  Counting only inside the window
// keeps the other segments and channel noise out of the sum; both points
// follow the published method.
//
// Interface: when `win_i` falls, `e_o` takes the finished count and `valid_o`
// pulses for one cycle; the counter then restarts at zero for the next
// window.  `e_o` holds its value between windows.  EW must hold 2N.
module phase_error_accum #(
  parameter int unsigned EW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          win_i,
  input  logic          q_i,
  output logic [EW-1:0] e_o,
  output logic          valid_o
);

  logic [EW-1:0] acc;
  logic          win_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      win_q   <= 1'b0;
      e_o     <= '0;
      valid_o <= 1'b0;
    end else begin
      win_q   <= win_i;
      valid_o <= 1'b0;
      if (win_i) begin
        acc <= acc + EW'(q_i);
      end else if (win_q) begin
        e_o     <= acc;
        valid_o <= 1'b1;
        acc     <= '0;
      end
    end
  end

  // the window never holds more cycles than the counter can count
  assert property (@(posedge clk) disable iff (!rst_n) win_i |-> acc != '1)
    else $error("phase_error_accum: counter overflow");

endmodule
