// Data-rate testbench of the rake finger.
//
// The same path (pilot on I, one Walsh-covered data channel on Q with 6 dB
// more power than the pilot, carrier phase 30 degrees, noise) is demodulated
// at three symbol lengths that span the service rates the card carries:
// 128 chips (28.8 ksym/s, speech-class channels), 16 chips (230 ksym/s) and
// 4 chips (922 ksym/s, the highest-rate class). A second code channel on
// another Walsh code of the same length is sent as well, with other bits.
// For each length the finger is started on the exact code phase; every
// symbol of both channels must carry its transmitted bit on the imaginary
// axis, with little energy on the real axis; symbols must come
// every SF chips, and the numbers must count up.
module tb_finger_rates;
  import wcdma_pkg::*;
  import tb_model_pkg::*;
  `include "tb_common.svh"
  localparam int D = 700;
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
    repeat (300000) @(posedge clk);
    check(0, "watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit data0 [], data1 [];
  longint cyc = 0, ep = 0;
  int l2sf = 7, w0 = 5, w1 = 3;
  real amp = 2.0;      // pilot amplitude; each data channel has twice it
  real cth = 0.8660254, sth = 0.5;
  always @(posedge clk) begin
    real r0, i0, r1, i1;
    cyc <= cyc + 1;
    sample_value(cyc + 1 - ep, D, amp, 2.0 * amp, w0, l2sf, data0, cth, sth, r0, i0);
    sample_value(cyc + 1 - ep, D, 0.0, 2.0 * amp, w1, l2sf, data1, cth, sth, r1, i1);
    x_i <= 5'(2 * adc(r0 + r1 + noise(1.0)) - 15);
    x_q <= 5'(2 * adc(i0 + i1 + noise(1.0)) - 15);
  end

  // symbol k after the start is symbol number k (the finger restarts its
  // code at chip 0); the first 'skip' symbols precede the first phase
  // estimate and are not checked
  int k0 = 0, k1 = 0, skip = 0, nsym = 0, nerr0 = 0, nerr1 = 0, nidx = 0;
  longint last_t = -1, bad_gap = 0;
  real er = 0, ei = 0;
  always @(posedge clk) if (rst_n && running) begin
    if (sym0_valid) begin
      if (k0 >= skip) begin
        if ((sym0.im < 0) != data0[k0 % data0.size()]) nerr0++;
        if (sym0.idx != 3'(k0)) nidx++;
        if (last_t >= 0 && (cyc - last_t > (8 << l2sf) + 2 || cyc - last_t < (8 << l2sf) - 2)) bad_gap++;
        last_t = cyc;
        nsym++;
        er += real'(sym0.re) ** 2;
        ei += real'(sym0.im) ** 2;
      end
      k0++;
    end
    if (sym1_valid) begin
      if (k1 >= skip && (sym1.im < 0) != data1[k1 % data1.size()]) nerr1++;
      k1++;
    end
  end

  function automatic int nsym_total(int l2);
    return l2 >= 7 ? 40 : (l2 >= 4 ? 200 : 400);
  endfunction

  task automatic run(input int l2);
    stop = 1; @(posedge clk); #1 stop = 0;
    l2sf = l2;
    cfg.offset = 18'(D - 6);
    cfg.walsh0 = 8'(w0); cfg.log2_sf0 = 4'(l2);
    cfg.walsh1 = 8'(w1); cfg.log2_sf1 = 4'(l2);
    cfg.sym_shift = 4'(l2 + 1);
    start = 1; @(posedge clk); #1 start = 0;
    repeat (10) @(posedge clk); #1;
    k0 = 0; k1 = 0; nsym = 0; nerr0 = 0; nerr1 = 0; nidx = 0; last_t = -1; bad_gap = 0; er = 0; ei = 0;
    skip = (256 >> l2) + 1;
    epoch = 1; ep = cyc; @(posedge clk); #1 epoch = 0;
    repeat (D + (skip + nsym_total(l2)) * (8 << l2)) @(posedge clk); #1;
    check(nsym >= nsym_total(l2) - 1, $sformatf("SF %0d: %0d symbols checked", 1 << l2, nsym));
    check(nerr0 == 0, $sformatf("SF %0d: %0d errors on channel 0", 1 << l2, nerr0));
    check(nerr1 == 0, $sformatf("SF %0d: %0d errors on channel 1", 1 << l2, nerr1));
    check(nidx == 0, $sformatf("SF %0d: %0d wrong symbol numbers", 1 << l2, nidx));
    check(er < ei / 20.0, $sformatf("SF %0d: derotated symbols on the imaginary axis (%f vs %f)", 1 << l2, er, ei));
    check(bad_gap == 0, $sformatf("SF %0d: symbol spacing not SF chips", 1 << l2));
  endtask

  initial begin
    init_codes();
    data0 = new [64]; data1 = new [64];
    foreach (data0[i]) data0[i] = 1'($urandom);
    foreach (data1[i]) data1[i] = 1'($urandom);
    cfg = '0;
    cfg.log2_plt = 4'd7; cfg.track_en = 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run(7);
    run(4);
    run(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
