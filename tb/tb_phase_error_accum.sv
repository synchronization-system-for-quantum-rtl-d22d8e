// tb_phase_error_accum -- opens windows of random length (up to 10 000
// cycles, the full-size 2 x 5000) with random, all-zero and all-one Q and
// compares each finished count with a count kept here; also checks that
// `valid_o` pulses once per window and the count restarts for the next.
`timescale 1ns/1ps
module tb_phase_error_accum;
  logic clk = 0, rst_n = 0, win = 0, q = 0, valid;
  logic [15:0] e;
  phase_error_accum #(.EW(16)) dut (.clk(clk), .rst_n(rst_n), .win_i(win), .q_i(q), .e_o(e), .valid_o(valid));
  always #5 clk = ~clk;

  int checks = 0, failures = 0, nvalid = 0;
  always @(posedge clk) if (rst_n && valid) nvalid++;

  initial begin
    int len, cnt, mode;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int w = 0; w < 12; w++) begin
      len  = (w == 0) ? 10000 : $urandom_range(3000, 1);
      mode = w % 3;
      cnt = 0;
      for (int c = 0; c < len; c++) begin
        win = 1;
        q = (mode == 0) ? 1'b1 : (mode == 1) ? 1'b0 : 1'($urandom_range(1, 0));
        if (q) cnt++;
        @(negedge clk);
      end
      win = 0; q = 1;     // Q outside the window must not count
      @(negedge clk);
      checks++; if (!valid || int'(e) != cnt) begin failures++; $display("FAIL window %0d: %0d vs %0d", w, e, cnt); end
      repeat ($urandom_range(20, 2)) @(negedge clk);
      checks++; if (int'(e) != cnt) failures++;
    end
    checks++; if (nvalid != 12) begin failures++; $display("FAIL %0d valid pulses", nvalid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
