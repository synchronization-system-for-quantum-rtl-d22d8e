// tb_phase_detector -- drives the detector with 78.125 MHz pulse trains at a
// sweep of phase offsets against a 156.25 MHz receiver clock.  For each
// pulse front the expected Q is worked out here from the offset: 1 when the
// receiver clock is high at the front (offset within the first half
// period).  Checked: Q right after each front, one `bit_o` per pulse in the
// receiver domain, and `q_o` carrying that pulse's Q in the same cycle.
// Offsets within 40 ps of a receiver falling edge are skipped, since there
// the receiver-side sample may legitimately land one cycle either way.
`timescale 1ps/1fs
module tb_phase_detector;
  logic sd = 0, rx_clk = 0, rst_n = 1, q_sd, q_o, bit_o;
  phase_detector dut (.sd_i(sd), .sd_rst_n(rst_n), .rx_clk(rx_clk), .rx_rst_n(rst_n),
                      .q_sd(q_sd), .q_o(q_o), .bit_o(bit_o));
  always #3200 rx_clk = ~rx_clk;   // rising edges at 3200 + k*6400

  int checks = 0, failures = 0;
  bit expq [$];
  int nfront = 0, nbit = 0;

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  always @(posedge rx_clk) begin
    #1;
    if (rst_n && bit_o) begin
      nbit++;
      chk(expq.size() > 0, "bit_o only after a pulse");
      if (expq.size() > 0) begin
        bit x;
        x = expq.pop_front();
        chk(q_o == x, $sformatf("q_o %0d carries the pulse's phase error %0d", q_o, x));
      end
    end
  end

  initial begin
    int phis[$] = '{100, 500, 1000, 1600, 2500, 3100, 3300, 4000, 5000, 6000, 6350};
    int ones = 0;
    #1 rst_n = 0;      // a real falling edge resets the pulse-clocked flops
    #20000 rst_n = 1;
    foreach (phis[i]) begin
      bit e;
      // idle a few cycles, then place fronts phi after a receiver rising edge
      repeat (4) @(posedge rx_clk);
      e = (phis[i] < 3200);
      repeat (20) begin
        #(phis[i]);
        sd = 1; nfront++; expq.push_back(e);
        #1 chk(q_sd == e, $sformatf("Q for offset %0d ps", phis[i]));
        if (q_sd) ones++;
        #1599 sd = 0;
        #(12800 - 1600 - phis[i]);
      end
    end
    repeat (4) @(posedge rx_clk);
    chk(nbit == nfront, $sformatf("%0d bits for %0d pulses", nbit, nfront));
    chk(ones > 0 && ones < nfront, "both Q values seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #50000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
