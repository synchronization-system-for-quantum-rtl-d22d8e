// async_fifo -- dual-clock FIFO with Gray-coded pointers.
//
// Words are written on `wclk` and read on `rclk`; the two clocks are
// unrelated.  Each side keeps a binary pointer one bit wider than the address
// and publishes it in Gray code; the other side sees it through a two-flop
// synchronizer.  `empty` is computed from the read pointer after the current
// read, so it rises in the cycle that reads the last available word, and it
// falls at least two read cycles after a write, once the write pointer has
// crossed over -- the read pause that the frequency-difference estimator
// counts.  `full` is the mirror image on the write side.
//
// Interface: write `wdata` when `winc` and not `full`; `rdata` shows the word
// at the head of the queue and `rinc` (ignored while `empty`) pops it.  Each
// side has its own active-low asynchronous reset; both must be asserted
// together to clear the queue.  Depth is 2**AW words.
module async_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned AW    = 4
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             winc,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,

  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rinc,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);

  logic [WIDTH-1:0] mem [2**AW];

  logic [AW:0] wbin, wgray, wbin_n, wgray_n;
  logic [AW:0] rbin, rgray, rbin_n, rgray_n;
  logic [AW:0] wq1_rgray, wq2_rgray;   // read pointer seen by the writer
  logic [AW:0] rq1_wgray, rq2_wgray;   // write pointer seen by the reader

  // ---------------- write side ----------------
  assign wbin_n  = wbin + (AW+1)'(winc && !full);
  assign wgray_n = (wbin_n >> 1) ^ wbin_n;

  always_ff @(posedge wclk) begin
    if (winc && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin      <= '0;
      wgray     <= '0;
      wq1_rgray <= '0;
      wq2_rgray <= '0;
      full      <= 1'b0;
    end else begin
      wbin      <= wbin_n;
      wgray     <= wgray_n;
      wq1_rgray <= rgray;
      wq2_rgray <= wq1_rgray;
      full      <= (wgray_n == {~wq2_rgray[AW:AW-1], wq2_rgray[AW-2:0]});
    end
  end

  // ---------------- read side ----------------
  assign rbin_n  = rbin + (AW+1)'(rinc && !empty);
  assign rgray_n = (rbin_n >> 1) ^ rbin_n;
  assign rdata   = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin      <= '0;
      rgray     <= '0;
      rq1_wgray <= '0;
      rq2_wgray <= '0;
      empty     <= 1'b1;
    end else begin
      rbin      <= rbin_n;
      rgray     <= rgray_n;
      rq1_wgray <= wgray;
      rq2_wgray <= rq1_wgray;
      empty     <= (rgray_n == rq2_wgray);
    end
  end

  initial assert (AW >= 2) else $error("async_fifo: AW must be at least 2");

endmodule
