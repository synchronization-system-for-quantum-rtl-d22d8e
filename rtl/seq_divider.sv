// seq_divider -- unsigned restoring divider, one quotient bit per cycle.
//
// `start` latches `dividend` and `divisor`; after NW cycles `done` pulses
// and `quotient` holds floor(dividend / divisor), which stays until the next
// start.  A zero divisor gives an all-ones quotient.
module seq_divider #(
  parameter int unsigned NW = 64,   // dividend and quotient width
  parameter int unsigned DW = 32    // divisor width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] dividend,
  input  logic [DW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quotient
);

  logic [NW-1:0]       q;
  logic [DW-1:0]       rem;
  logic [DW-1:0]       dv;
  logic [$clog2(NW):0] cnt;
  logic [DW:0]         trial;

  assign trial = {rem, q[NW-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0; rem <= '0; dv <= '0; cnt <= '0;
      busy <= 1'b0; done <= 1'b0; quotient <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        q    <= dividend;
        dv   <= divisor;
        rem  <= '0;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (trial >= {1'b0, dv}) begin
          rem <= DW'(trial - {1'b0, dv});
          q   <= {q[NW-2:0], 1'b1};
        end else begin
          rem <= DW'(trial);
          q   <= {q[NW-2:0], 1'b0};
        end
        cnt <= cnt + 1'b1;
        if (cnt == ($clog2(NW)+1)'(NW - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          quotient <= (trial >= {1'b0, dv}) ? {q[NW-2:0], 1'b1} : {q[NW-2:0], 1'b0};
        end
      end
    end
  end

endmodule
