// tb_async_fifo -- dual-clock FIFO with unrelated 7 ns write and 9.3 ns read
// clocks and random write/read requests.  A queue kept here predicts every
// word read; the test also checks empty after reset, that `full` stops
// writes at 16 words, that empty rises in the cycle after the last word is
// read, and that a word written to an empty FIFO shows up 2-4 read cycles
// later.
`timescale 1ns/1ps
module tb_async_fifo;
  logic wclk = 0, rclk = 0, rst_n = 0, winc = 0, rinc = 0, full, empty;
  logic [7:0] wdata = 0, rdata;
  async_fifo #(.WIDTH(8), .AW(4)) dut (
    .wclk(wclk), .wrst_n(rst_n), .winc(winc), .wdata(wdata), .full(full),
    .rclk(rclk), .rrst_n(rst_n), .rinc(rinc), .rdata(rdata), .empty(empty));
  always #3.5 wclk = ~wclk;
  always #4.65 rclk = ~rclk;

  int checks = 0, failures = 0;
  logic [7:0] q [$];
  int nwr = 0;

  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  // writer
  always @(posedge wclk) if (rst_n) begin
    if (winc && !full) begin q.push_back(wdata); nwr++; end
  end
  // reader
  always @(posedge rclk) if (rst_n) begin
    if (rinc && !empty) begin
      chk(q.size() > 0, "read from a non-empty model");
      if (q.size() > 0) chk(rdata == q.pop_front(), "data order");
    end
  end

  initial begin
    int lat;
    #20; @(negedge wclk); rst_n = 1;
    @(negedge rclk); chk(empty, "empty after reset");
    // fill until full, no reads
    @(negedge wclk); winc = 1;
    repeat (30) begin wdata = wdata + 1; @(negedge wclk); end
    winc = 0;
    chk(full, "full after 30 writes");
    chk(q.size() == 16, $sformatf("16 words accepted (%0d)", q.size()));
    // drain completely; check empty rises right after the last read
    @(negedge rclk); rinc = 1;
    wait (q.size() == 0);
    @(negedge rclk);
    chk(empty, "empty right after the last word is read");
    rinc = 0;
    // latency of one word into an empty FIFO
    @(negedge wclk); winc = 1; wdata = 8'hA5; @(negedge wclk); winc = 0;
    lat = 0;
    while (empty && lat < 10) begin @(negedge rclk); lat++; end
    chk(lat >= 2 && lat <= 4, $sformatf("first-word latency %0d read cycles", lat));
    @(negedge rclk); rinc = 1; @(negedge rclk); rinc = 0;
    // random traffic
    fork
      repeat (2000) begin @(negedge wclk); winc = ($urandom_range(3, 0) != 0); wdata = 8'($urandom); end
      repeat (1600) begin @(negedge rclk); rinc = ($urandom_range(3, 0) != 0); end
    join
    winc = 0; rinc = 1;
    repeat (40) @(negedge rclk);
    chk(q.size() == 0 && empty, "drained at the end");
    chk(nwr > 1000, "enough traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
