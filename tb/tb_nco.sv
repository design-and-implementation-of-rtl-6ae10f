// Testbench of nco: with zero control the chip strobe comes every 8 clocks;
// a constant control word shifts the strobe rate as (8192+c)/65536 per clock;
// 'sync' restarts the phase so the next strobe is 8 clocks later.
module tb_nco;
  `include "tb_common.svh"
  logic clk = 0, rst_n = 0, sync = 0;
  logic signed [11:0] freq_ctl = 0;
  logic chip_en;
  logic [15:0] phase;
  nco #(.ACC_W(16), .OSR(8), .CTL_W(12)) dut (.*);
  always #5 clk = !clk;
  initial begin
    repeat (500000) @(posedge clk);
    check(0, "watchdog"); finish_tb();
  end
  int cnt, last, gaps_ok;
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    sync = 1; @(posedge clk); #1 sync = 0;
    // first strobe 8 clocks after sync, then every 8
    cnt = 0; last = -1; gaps_ok = 1;
    for (int t = 1; t <= 800; t++) begin
      @(posedge clk); #1;
      if (chip_en) begin
        if (last < 0) check(t == 8, $sformatf("first strobe at %0d", t));
        else if (t - last != 8) gaps_ok = 0;
        last = t; cnt++;
      end
    end
    check(gaps_ok == 1 && cnt == 100, $sformatf("nominal rate: %0d strobes", cnt));
    for (int c = -256; c <= 256; c += 128) begin
      int want;
      freq_ctl = 12'(c);
      sync = 1; @(posedge clk); #1 sync = 0;
      cnt = 0;
      for (int t = 0; t < 65536; t++) begin @(posedge clk); #1 cnt += chip_en; end
      want = 8192 + c;   // strobes in 65536 clocks
      check(cnt >= want - 1 && cnt <= want, $sformatf("ctl %0d: %0d strobes want %0d", c, cnt, want));
    end
    finish_tb();
  end
endmodule
