// tb_pd_controller -- runs the controller through random phase errors and
// gains and compares each new frequency word with
//   f(n) = f(n-1) - floor((Kp*(e(n)-target) + Kd*(e(n)-e(n-1))) / 2^8)
// worked out here in real arithmetic (Kd term absent on the first
// iteration after init).  Also checks init, the one-cycle load strobe, and
// that the word holds when no update is requested.
`timescale 1ns/1ps
module tb_pd_controller;
  logic clk = 0, rst_n = 0, init = 0, update = 0, load;
  logic signed [47:0] f_init = 0, f, stp;
  logic [15:0] e = 0, tgt = 16'd5000;
  logic [31:0] kp = 0, kd = 0;
  pd_controller dut (.clk(clk), .rst_n(rst_n), .init(init), .f_init(f_init), .update(update),
                     .e_i(e), .e_target(tgt), .kp(kp), .kd(kd), .f_ref_o(f), .f_load_o(load), .step_o(stp));
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  initial begin
    real fexp, eprev;
    bit first;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      f_init = 48'sd1_000_000 * run - 48'sd1_234_567;
      kp = $urandom_range(2_000_000, 1);
      kd = (run == 0) ? 0 : $urandom_range(200_000_000, 1);
      init = 1; @(negedge clk); init = 0;
      chk(load && f == f_init, "init loads the word");
      fexp = real'(f_init); first = 1;
      for (int n = 0; n < 50; n++) begin
        real sum;
        e = (n % 10 == 0) ? 16'd0 : (n % 10 == 1) ? 16'd10000 : 16'($urandom_range(10000, 0));
        update = 1; @(negedge clk); update = 0;
        sum = real'(kp) * (real'(e) - real'(tgt));
        if (!first) sum += real'(kd) * (real'(e) - eprev);
        fexp = fexp - $floor(sum / 256.0);
        chk(load, "load strobe after update");
        chk(real'(f) == fexp, $sformatf("word %0d vs %0.0f", f, fexp));
        eprev = real'(e); first = 0;
        @(negedge clk);
        chk(!load && real'(f) == fexp, "word holds without update");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
