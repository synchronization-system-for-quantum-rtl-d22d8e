// event_sync -- carries single-cycle events from a source clock domain into a
// destination domain.  Each source event flips a toggle flop; the
// destination samples the toggle through two flops and turns every change
// into a one-cycle pulse `pulse_o`, two to three destination cycles later.
// Events closer together than about two destination cycles may merge.
module event_sync (
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic event_i,
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic pulse_o
);
  logic tog, s1, s2, s3;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n)   tog <= 1'b0;
    else if (event_i) tog <= ~tog;
  end

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) {s3, s2, s1} <= 3'b000;
    else            {s3, s2, s1} <= {s2, s1, tog};
  end

  assign pulse_o = s2 ^ s3;
endmodule
