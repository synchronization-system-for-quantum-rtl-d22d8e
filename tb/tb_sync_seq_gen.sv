// tb_sync_seq_gen -- transmitter sequence generator at a reduced frame
// (start_gap 10, 20 pulses, 8-bit payload, end_gap 12, guard 5, 300-cycle
// frame).  In continuous mode every cycle must carry a pulse.  In framed
// mode every output bit of four frames is compared with a frame built here:
// gaps empty, sync_pulse 1010..., the M sequence from the recurrence
// s[n+7] = s[n] ^ s[n+3] with an all-ones start, the iteration number MSB
// first; also the segment, quantum window, frame-start marker, the pulse
// count per segment, and the iteration number stepping once per frame.
`timescale 1ns/1ps
module tb_sync_seq_gen;
  import qkd_sync_pkg::*;
  localparam int SG = 10, NP = 20, PB = 8, EG = 12, GD = 5, TR = 300;
  localparam int SS = SG, CS = SS + 2*NP, PS = CS + 127, ES = PS + PB, QS = ES + EG, QE = TR - GD;

  logic clk = 0, rst_n = 0, laser, qwin, fs;
  tx_mode_e mode = TX_CONTINUOUS;
  seg_e seg;
  logic [$clog2(TR)-1:0] pos;
  logic [PB-1:0] iter;
  sync_seq_gen #(.START_GAP(SG), .PULSES(NP), .PBITS(PB), .END_GAP(EG), .GUARD(GD), .T_REP(TR)) dut (
    .clk(clk), .rst_n(rst_n), .mode(mode), .laser_o(laser), .seg_o(seg), .pos_o(pos),
    .qwin_o(qwin), .frame_start_o(fs), .iter_o(iter));
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit m [0:140];
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask

  initial begin
    int p, pulses_sync, frames;
    bit expb; seg_e exps;
    for (int i = 0; i < 7; i++) m[i] = 1;
    for (int n = 0; n + 7 <= 140; n++) m[n+7] = m[n] ^ m[n+3];
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (3) @(negedge clk);
    repeat (50) begin @(negedge clk); chk(laser == 1'b1 && !qwin, "continuous pulse"); end
    mode = TX_FRAMED;
    // wait for first frame start
    while (!fs) @(negedge clk);
    frames = 0; pulses_sync = 0;
    for (int c = 0; c < 4 * TR; c++) begin
      p = c % TR;
      if (p == 0 && c > 0) begin
        chk(pulses_sync == NP, $sformatf("%0d pulses in sync_pulse", pulses_sync));
        pulses_sync = 0;
      end
      chk(int'(pos) == p, $sformatf("position %0d vs %0d", pos, p));
      chk(int'(iter) == c / TR, "iteration number");
      chk(fs == (p == 0), "frame start marker");
      if (p < SS)      begin exps = SEG_START_GAP;  expb = 0; end
      else if (p < CS) begin exps = SEG_SYNC_PULSE; expb = ((p - SS) % 2 == 0); end
      else if (p < PS) begin exps = SEG_CORR_DATA;  expb = m[p - CS]; end
      else if (p < ES) begin exps = SEG_PAYLOAD;    expb = ((c / TR) >> (PB - 1 - (p - PS))) & 1; end
      else if (p < QS) begin exps = SEG_END_GAP;    expb = 0; end
      else if (p < QE) begin exps = SEG_QUANTUM;    expb = 0; end
      else             begin exps = SEG_GUARD;      expb = 0; end
      chk(seg == exps, $sformatf("segment at %0d", p));
      chk(laser == expb, $sformatf("laser bit at position %0d", p));
      chk(qwin == (exps == SEG_QUANTUM), "quantum window");
      if (exps == SEG_SYNC_PULSE && laser) pulses_sync++;
      @(negedge clk);
    end
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
