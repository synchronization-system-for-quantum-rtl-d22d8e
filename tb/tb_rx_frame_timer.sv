// tb_rx_frame_timer -- receiver frame timing at a reduced layout (start_gap
// 10, 20 pulses, 8-bit payload, end_gap 12, guard 5, 300-cycle frame; so
// payload at 177..184, phase window 10..49, quantum window 197..294).  The
// test supplies the bit stream and correlator peaks itself and checks:
// a peak during an uninterrupted pulse train is ignored (search not armed),
// a peak after 127 empty cycles locks the timer with the payload start
// position, payloads are read MSB first, the phase-error and quantum windows
// sit at the layout's positions with the right lengths, a peak 3 cycles
// late re-aligns, a peak far from the expected place is ignored, and three
// frames without a peak report three misses and drop the lock.
`timescale 1ns/1ps
module tb_rx_frame_timer;
  localparam int SG = 10, NP = 20, PB = 8, EG = 12, GD = 5, TR = 300;
  localparam int SS = SG, CS = SS + 2*NP, PS = CS + 127, ES = PS + PB, QS = ES + EG, QE = TR - GD;
  logic clk = 0, rst_n = 0, en = 0, bit_i = 0, peak = 0;
  logic corr_en, locked, pwin, swin, qwin, pvalid, realign, miss;
  logic [8:0] pos;
  logic [7:0] payload;
  rx_frame_timer #(.START_GAP(SG), .PULSES(NP), .PBITS(PB), .END_GAP(EG), .GUARD(GD), .T_REP(TR),
                   .SEARCH(16), .MISS_LIMIT(3)) dut (
    .clk(clk), .rst_n(rst_n), .enable(en), .bit_i(bit_i), .peak_i(peak), .corr_en_o(corr_en),
    .locked_o(locked), .pos_o(pos), .phase_win_o(pwin), .sync_win_o(swin), .qwin_o(qwin),
    .payload_o(payload), .payload_valid_o(pvalid), .realign_o(realign), .miss_o(miss));
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int nmiss = 0, npw = 0, nq = 0, pw_first = -1, q_first = -1;
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", s, $time); end
  endtask
  always @(posedge clk) if (rst_n) begin
    if (miss) nmiss++;
    if (pwin) begin npw++; if (pw_first < 0) pw_first = pos; end
    if (qwin) begin nq++;  if (q_first < 0)  q_first = pos; end
  end

  // one cycle with a peak, then the payload bits; returns after the payload
  task automatic peak_with_payload(input logic [7:0] v, input bit expect_accept);
    peak = 1; bit_i = v[7]; #1;
    chk(realign == expect_accept, "peak acceptance");
    if (expect_accept) chk(int'(pos) == PS, "position loaded with payload start");
    @(negedge clk); peak = 0;
    for (int i = 6; i >= 0; i--) begin bit_i = v[i]; @(negedge clk); end
    bit_i = 0;
  endtask

  task automatic wait_pos(input int p);
    while (int'(pos) != p) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1; en = 1;
    // uninterrupted pulses: a peak here must be ignored
    bit_i = 1;
    repeat (150) @(negedge clk);
    peak = 1; #1 chk(!realign && !corr_en, "no search during the continuous pulse train"); @(negedge clk); peak = 0;
    repeat (50) @(negedge clk);
    bit_i = 0;
    repeat (130) @(negedge clk);
    chk(corr_en && !locked, "search armed after 127 empty cycles");
    // first lock
    peak_with_payload(8'hA5, 1);
    @(negedge clk);
    chk(locked, "locked after the peak");
    chk(payload == 8'hA5, $sformatf("payload %h", payload));
    // next frame: peak at the expected place
    npw = 0; nq = 0; pw_first = -1; q_first = -1;
    wait_pos(PS);
    chk(npw == 2 * NP && pw_first == SS, $sformatf("phase window %0d cycles from %0d", npw, pw_first));
    nq = 0; q_first = -1;
    peak_with_payload(8'h3C, 1);
    @(negedge clk);
    chk(payload == 8'h3C, "second payload");
    wait_pos(0);
    chk(nq == QE - QS, $sformatf("quantum window %0d cycles", nq));
    chk(q_first == QS, "quantum window start");
    // next frame: peak three cycles late re-aligns
    wait_pos(PS + 3);
    peak_with_payload(8'h81, 1);
    @(negedge clk);
    chk(payload == 8'h81, "payload after re-alignment");
    // a peak far from the expected place is ignored
    wait_pos(PS + 100);
    peak = 1; #1 chk(!realign, "peak outside the search window ignored"); @(negedge clk); peak = 0;
    // three frames without a peak
    nmiss = 0;
    repeat (3 * TR + 20) @(negedge clk);
    chk(nmiss == 3, $sformatf("%0d misses", nmiss));
    chk(!locked, "lock dropped after three misses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
