// Testbench of timing_gen (short periods: 6-chip groups, 24-chip frames,
// 32-chip PN epochs): strobe spacing, restart by the 20 ms and 2 s
// references with resync reporting, and the loop-back data selector.
module tb_timing_gen;
  `include "tb_common.svh"
  logic clk = 0, rst_n = 0, loopback = 0, ref_20ms = 0, ref_2s = 0;
  logic [5:0][3:0] rx_i, rx_q, lb_i, lb_q, data_i, data_q;
  logic chip, pcg, frame, epoch, resync;
  timing_gen #(.PCG_LEN(6), .FRAME_LEN(24), .EPOCH_LEN(32)) dut (.*);
  always #5 clk = !clk;
  initial begin
    repeat (50000) @(posedge clk);
    check(0, "watchdog"); finish_tb();
  end
  int t = 0, lc = -1, lp = -1, lf = -1, le = -1, bad = 0, n_resync = 0;
  int n_chip = 0, n_pcg = 0, n_frame = 0, n_epoch = 0;
  bit spacing_on = 1;
  always @(posedge clk) if (rst_n) begin
    t++;
    if (chip)  begin if (spacing_on && lc >= 0 && t - lc != 8)    bad++; lc = t; n_chip++;  end
    if (pcg)   begin if (spacing_on && lp >= 0 && t - lp != 48)   bad++; lp = t; n_pcg++;   end
    if (frame) begin if (spacing_on && lf >= 0 && t - lf != 192)  bad++; lf = t; n_frame++; end
    if (epoch) begin if (spacing_on && le >= 0 && t - le != 256)  bad++; le = t; n_epoch++; end
    n_resync += resync;
  end
  initial begin
    rx_i = '0; rx_q = '0; lb_i = '0; lb_q = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (3000) @(posedge clk); #1;
    check(bad == 0, $sformatf("strobe spacing (%0d bad)", bad));
    check(n_chip > 370 && n_pcg > 60 && n_frame > 14 && n_epoch > 10, "all strobes seen");
    check(n_resync == 0, "no resync while free running");
    // 20 ms reference out of step: restart of frame timing
    spacing_on = 0;
    ref_20ms = 1; @(posedge clk); #1 ref_20ms = 0;
    @(posedge clk); #1;
    check(frame == 0 && n_resync == 1, "resync reported");
    le = -1; lf = -1; lp = -1; lc = -1; bad = 0; spacing_on = 1;
    repeat (1000) @(posedge clk); #1;
    check(bad == 0, "frame timing follows the reference");
    // 2 s reference restarts the PN epoch too
    spacing_on = 0;
    ref_2s = 1; @(posedge clk); #1 ref_2s = 0;
    check(epoch == 1, "epoch on the 2 s reference");
    le = -1; lf = -1; lp = -1; lc = -1; bad = 0; spacing_on = 1;
    repeat (1000) @(posedge clk); #1;
    check(bad == 0, "epoch timing follows the 2 s reference");
    // data selector
    for (int k = 0; k < 20; k++) begin
      rx_i = 24'($urandom); rx_q = 24'($urandom); lb_i = 24'($urandom); lb_q = 24'($urandom);
      loopback = 1'(k % 2);
      @(posedge clk); #1;
      check(data_i == (loopback ? lb_i : rx_i) && data_q == (loopback ? lb_q : rx_q), "data selector");
    end
    finish_tb();
  end
endmodule
