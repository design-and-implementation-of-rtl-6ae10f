// Testbench of finger: a reverse-link path (pilot on I, a Walsh-covered
// 9.6 kbps-class data channel on Q with 6 dB more power, carrier phase
// 30 degrees, noise) delayed by D samples after the PN epoch.
// Run A starts the finger on the exact code phase: every DCCH symbol must
// carry the transmitted bit on the imaginary axis, the FCH/SCH correlator
// (another Walsh code) must see almost nothing, symbols must come every
// SF chips with consecutive numbers. Run B starts it 3 samples (3/8 chip)
// late: the tracking loop must pull the chip strobe back onto the chip
// centre, and then demodulate without errors.
module tb_finger;
  import wcdma_pkg::*;
  import tb_model_pkg::*;
  `include "tb_common.svh"
  localparam int D = 1000, WAL = 5, L2SF = 6;
  logic clk = 0, rst_n = 0, epoch = 0, start = 0, stop = 0;
  logic signed [4:0] x_i = 0, x_q = 0;
  finger_cfg_t cfg;
  logic running, sym0_valid, sym1_valid, plt_valid;
  soft_sym_t sym0, sym1;
  logic signed [7:0] plt_re, plt_im;
  logic [15:0] plt_energy;
  logic signed [11:0] freq_ctl;
  logic [17:0] rtd;
  finger dut (.*);
  always #5 clk = !clk;
  initial begin
    repeat (400000) @(posedge clk);
    check(0, "watchdog"); finish_tb();
  end

  bit data [];
  longint cyc = 0, ep = 0;
  real cth = 0.8660254, sth = 0.5;
  // sample source: sample index = clocks since the epoch strobe
  always @(posedge clk) begin
    real re, im;
    cyc <= cyc + 1;
    sample_value(cyc + 1 - ep, D, 3.0, 6.0, WAL, L2SF, data, cth, sth, re, im);
    x_i <= 5'(2 * adc(re + noise(2.0)) - 15);
    x_q <= 5'(2 * adc(im + noise(2.0)) - 15);
  end

  // symbol checker
  int k0 = 0, nerr = 0, nsym = 0, skip = 0;
  longint last_t = -1, bad_gap = 0;
  real e0 = 0, e1 = 0, er = 0;
  always @(posedge clk) if (rst_n && running) begin
    if (sym0_valid) begin
      if (k0 >= skip) begin
        bit want;
        want = data[k0 % data.size()];
        if ((sym0.im < 0) != want || sym0.idx != 3'(k0)) nerr++;
        nsym++;
        e0 += real'(sym0.im) ** 2;
        er += real'(sym0.re) ** 2;
        if (last_t >= 0 && (cyc - last_t > (8 << L2SF) + 2 || cyc - last_t < (8 << L2SF) - 2)) bad_gap++;
        last_t = cyc;
      end
      k0++;
    end
    if (sym1_valid && k0 > skip) e1 += real'(sym1.re) ** 2 + real'(sym1.im) ** 2;
  end

  // on-time phase of the chip strobe relative to the path's chip grid
  int phase_hist [8];
  bit hist_on = 0;
  always @(posedge clk) if (hist_on && dut.chip_en) phase_hist[int'((cyc - ep - D) & 7)]++;

  task automatic run(input int offset_err, input int nsym_skip, input string name);
    stop = 1; @(posedge clk); #1 stop = 0;
    cfg.offset = 18'(D - 6 + offset_err);
    start = 1; @(posedge clk); #1 start = 0;
    repeat (10) @(posedge clk); #1;
    epoch = 1; ep = cyc; @(posedge clk); #1 epoch = 0;
    repeat (cfg.offset + 40) @(posedge clk); #1;
    // chip 0 comes OSR + 2 clocks after the offset count (see the finger)
    check(rtd == 18'(cfg.offset + 10), $sformatf("%s: round trip delay %0d for offset %0d", name, rtd, cfg.offset));
    k0 = 0; nerr = 0; nsym = 0; skip = nsym_skip; e0 = 0; e1 = 0; er = 0; last_t = -1; bad_gap = 0;
    foreach (phase_hist[i]) phase_hist[i] = 0;
    hist_on = 0;
    repeat (nsym_skip * (8 << L2SF) + 2000) @(posedge clk);
    hist_on = 1;
    repeat (40 * (8 << L2SF)) @(posedge clk); #1;
    check(nsym >= 38, $sformatf("%s: %0d symbols", name, nsym));
    check(nerr == 0, $sformatf("%s: %0d symbol errors", name, nerr));
    check(bad_gap == 0, $sformatf("%s: symbol spacing not SF chips (+-2 samples)", name));
    check(er < e0 / 20.0, $sformatf("%s: derotated data lies on the imaginary axis (%f vs %f)", name, er, e0));
    check(e1 < e0 / 50.0, $sformatf("%s: other Walsh channel rejected (%f vs %f)", name, e1, e0));
    check(phase_hist[3] + phase_hist[4] + phase_hist[5] > 0 &&
          phase_hist[0] + phase_hist[1] + phase_hist[7] == 0,
          $sformatf("%s: on-time samples inside the chip (%0d %0d %0d %0d %0d %0d %0d %0d)", name,
                    phase_hist[0], phase_hist[1], phase_hist[2], phase_hist[3],
                    phase_hist[4], phase_hist[5], phase_hist[6], phase_hist[7]));
  endtask

  int max_ctl = 0;
  always @(posedge clk) if (rst_n && (freq_ctl > max_ctl || -freq_ctl > max_ctl))
    max_ctl = freq_ctl > 0 ? int'(freq_ctl) : -int'(freq_ctl);

  initial begin
    init_codes();
    data = new [64];
    foreach (data[i]) data[i] = 1'($urandom);
    cfg = '0;
    cfg.walsh0 = 8'(WAL); cfg.log2_sf0 = 4'(L2SF);
    cfg.walsh1 = 8'(WAL ^ 3); cfg.log2_sf1 = 4'(L2SF);
    cfg.log2_plt = 4'd7; cfg.sym_shift = 4'd8; cfg.track_en = 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run(0, 2, "exact phase");
    check(max_ctl <= 16, "loop output within its clamp");
    max_ctl = 0;
    run(3, 30, "3/8 chip late start");
    check(max_ctl > 0, "tracking loop acted");
    finish_tb();
  end
endmodule
