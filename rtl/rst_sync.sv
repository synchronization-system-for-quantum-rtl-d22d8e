// rst_sync -- reset synchronizer: asserts asynchronously with `arst_n` and
// releases two edges of `clk` after it, so a clock domain leaves reset on
// its own clock.  Output `rst_n_o` is active low.
module rst_sync (
  input  logic clk,
  input  logic arst_n,
  output logic rst_n_o
);
  logic s1;
  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) {rst_n_o, s1} <= 2'b00;
    else         {rst_n_o, s1} <= {s1, 1'b1};
  end
endmodule
