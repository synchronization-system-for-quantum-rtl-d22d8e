// pd_controller -- proportional-derivative controller of the periodic
// frequency correction.
//
// At each correction iteration n it takes the accumulated phase error e(n)
// and updates the receiver synthesizer reference-frequency word:
//
//   f_ref(n) = f_ref(n-1) - (P + D)
//   P = Kp * (e(n) - e_target)
//   D = Kd * (e(n) - e(n-1))
//
// which is the published control law; it holds the phase error at the
// intermediate value e_target, i.e. the pulse fronts on the slope of the
// phase-detector characteristic.  The gains are run-time inputs because the
// published values were found empirically and are not given.  Fixed-point
// format, the single rounding step and the first iteration are this design's
// choices: Kp and Kd are unsigned with KFRAC fraction bits in uHz per error
// count, Kp*(e-e_target) + Kd*(e-e_prev) is formed exactly and shifted
// right (arithmetic, i.e. rounded towards minus infinity) by KFRAC once, and
// the first iteration after `init` has no previous error, so D = 0.
//
// Interface: `init` loads `f_init` (the result of the starting correction)
// and forgets e(n-1).  `update` with `e_i` runs one iteration; the new word
// appears on `f_ref_o` one cycle later together with a one-cycle `f_load_o`
// (also pulsed after `init`).  `step_o` is the applied P + D.
module pd_controller #(
  parameter int unsigned EW    = 16,
  parameter int unsigned FW    = 48,
  parameter int unsigned KW    = 32,
  parameter int unsigned KFRAC = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 init,
  input  logic signed [FW-1:0] f_init,
  input  logic                 update,
  input  logic        [EW-1:0] e_i,
  input  logic        [EW-1:0] e_target,
  input  logic        [KW-1:0] kp,
  input  logic        [KW-1:0] kd,
  output logic signed [FW-1:0] f_ref_o,
  output logic                 f_load_o,
  output logic signed [FW-1:0] step_o
);

  localparam int unsigned PW = EW + KW + 3;  // product width with sign and sum

  logic        [EW-1:0] e_prev;
  logic                 have_prev;
  logic signed [EW:0]   err_p, err_d;
  logic signed [PW-1:0] sum;
  logic signed [PW-1:0] step_full;
  logic signed [FW-1:0] step;

  assign err_p = $signed({1'b0, e_i}) - $signed({1'b0, e_target});
  assign err_d = have_prev ? ($signed({1'b0, e_i}) - $signed({1'b0, e_prev})) : '0;

  always_comb begin
    sum = PW'($signed({1'b0, kp}) * err_p) + PW'($signed({1'b0, kd}) * err_d);
    step_full = sum >>> KFRAC;
    step = FW'(step_full);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_ref_o   <= '0;
      f_load_o  <= 1'b0;
      step_o    <= '0;
      e_prev    <= '0;
      have_prev <= 1'b0;
    end else begin
      f_load_o <= 1'b0;
      if (init) begin
        f_ref_o   <= f_init;
        f_load_o  <= 1'b1;
        have_prev <= 1'b0;
        step_o    <= '0;
      end else if (update) begin
        f_ref_o   <= f_ref_o - step;
        f_load_o  <= 1'b1;
        step_o    <= step;
        e_prev    <= e_i;
        have_prev <= 1'b1;
      end
    end
  end

endmodule
