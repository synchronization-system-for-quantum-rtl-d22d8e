// tb_mseq_lfsr -- checks the M-sequence generator against a sequence built
// here from the recurrence of P(x) = 1 + x^3 + x^7 on an array: every bit of
// two periods, 64 ones per period, period exactly 127, `load` restarting at
// the seed and `step` low holding the state.
`timescale 1ns/1ps
module tb_mseq_lfsr;
  logic clk = 0, rst_n = 0, load = 0, step = 0, bit_o;
  logic [6:0] st;
  mseq_lfsr dut (.clk(clk), .rst_n(rst_n), .load(load), .step(step), .bit_o(bit_o), .state_o(st));
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit s [0:300];
  initial begin
    int ones;
    for (int i = 0; i < 7; i++) s[i] = 1'b1;
    for (int n = 0; n + 7 <= 300; n++) s[n + 7] = s[n] ^ s[n + 3];
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    ones = 0;
    for (int i = 0; i < 254; i++) begin
      checks++; if (bit_o !== s[i]) begin failures++; $display("FAIL bit %0d", i); end
      if (i < 127 && bit_o) ones++;
      if (i > 0 && i < 127) begin
        checks++; if (st == 7'h7F) begin failures++; $display("FAIL early repeat at %0d", i); end
      end
      step = 1; @(negedge clk); step = 0;
    end
    checks++; if (ones != 64) begin failures++; $display("FAIL ones=%0d", ones); end
    // hold
    repeat (3) @(negedge clk);
    checks++; if (bit_o !== s[254]) failures++;
    // load restarts
    step = 1; repeat (5) @(negedge clk); step = 0;
    load = 1; @(negedge clk); load = 0;
    checks++; if (st !== 7'h7F) begin failures++; $display("FAIL load"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
