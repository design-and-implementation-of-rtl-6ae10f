// End-to-end testbench of channel_card.
//
// One mobile sends pilot, a DCCH (Walsh 5, 64 chips per symbol) and an FCH
// (Walsh 2, 16 chips per symbol), the pilot 6 dB below each traffic channel.
// Antenna 0 sector 0 receives two paths (delays DA and DB samples after the
// PN epoch, amplitudes 0.6 and 0.4), antenna 1 sector 0 one path (delay DC);
// the other inputs carry noise. The testbench plays the DSP and the base
// station controller:
//   1. searcher 0 searches antenna 0 (group 0) and antenna 1 (group 1); the
//      sorted results of antenna 0, with neighbours of a stronger entry
//      dropped, are the path candidates, and both real paths must be among
//      them (with the data channels 6 dB above the pilot, a 128-chip dwell
//      has sidelobes that can take one of the four places);
//   2. a finger is started on every candidate and one on antenna 1 (the
//      finger on path A one sample off, so the tracking loop has to act);
//      the lock detectors must lock exactly the fingers on real paths, the
//      others are stopped and the locked ones combined;
//   3. the combined DCCH and FCH symbols are read from the DPRAM and must
//      match the transmitted bits;
//   4. power-control commands (down with a low set point, up with a high
//      one, switched at a frame boundary), a timing resync and the loop-back
//      switch (which makes the fingers lose lock) are exercised.
// The top runs with its default sizes (about 41 ms of signal).
// Each mechanism is counted; one that never happened is a failure.
module tb_channel_card;
  import wcdma_pkg::*;
  import tb_model_pkg::*;
  `include "tb_common.svh"
  // the top runs with its default sizes (PCG 4608 chips, frame 73728 chips)
  localparam int PCG_L = PCG_CHIPS, FRAME_L = FRAME_CHIPS;
  logic clk = 0, rst_n = 0;
  logic [5:0][3:0] rx_i, rx_q, lb_i, lb_q;
  logic loopback = 0, ref_20ms = 0, ref_2s = 0;
  logic [1:0] srch_cs = 0;
  logic srch_we = 0;
  logic [7:0] srch_addr = 0;
  logic [15:0] srch_wdata = 0;
  logic [1:0][15:0] srch_rdata;
  logic [1:0] srch_irq;
  logic cpu_cs = 0, cpu_we = 0;
  logic [7:0] cpu_addr = 0;
  logic [15:0] cpu_wdata = 0, cpu_rdata;
  logic cpu_irq;
  logic [3:0][2:0] finger_sel;
  logic [9:0] dp_addr = 0;
  logic [15:0] dp_rdata;
  logic sp_valid = 0;
  logic [11:0] setpoint = 0;
  logic pc_bit, pc_valid, pcg, frame, epoch, resync;

  channel_card dut (.*);

  always #5 clk = !clk;
  initial begin
    repeat (8000000) @(posedge clk);
    check(0, "watchdog"); finish_tb();
  end

  // ---------------- signal source
  localparam int DA = 300, DB = 340, DC = 420;
  bit dA [], dB [];
  longint cyc = 0, ep = -1000000;
  bit first_epoch = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (epoch && !first_epoch) begin ep <= cyc; first_epoch <= 1; end
  end
  function automatic void user(longint s, longint d, real g, output real re, output real im);
    real r1, i1, r2, i2;
    sample_value(s, d, 2.5 * g, 5.0 * g, 5, 6, dA, 0.8, 0.6, r1, i1);
    sample_value(s, d, 0.0, 5.0 * g, 2, 4, dB, 0.8, 0.6, r2, i2);
    re = r1 + r2; im = i1 + i2;
  endfunction
  always @(posedge clk) begin
    real ra, ia, rb, ib, rc, ic;
    longint s;
    s = cyc + 1 - ep;
    user(s, DA, 0.6, ra, ia);
    user(s, DB, 0.4, rb, ib);
    user(s, DC, 0.6, rc, ic);
    for (int k = 0; k < 6; k++) begin
      rx_i[k] <= 4'(adc(noise(2.0))); rx_q[k] <= 4'(adc(noise(2.0)));
      lb_i[k] <= 4'(7 + (k % 2)); lb_q[k] <= 4'(8 - (k % 2));
    end
    rx_i[0] <= 4'(adc(ra + rb + noise(2.0))); rx_q[0] <= 4'(adc(ia + ib + noise(2.0)));
    rx_i[3] <= 4'(adc(rc + noise(2.0)));      rx_q[3] <= 4'(adc(ic + noise(2.0)));
  end

  // ---------------- mechanism counters
  int n_srch_irq = 0, n_lock_irq = 0, n_track = 0, n_pc_up = 0, n_pc_down = 0;
  int n_reject = 0;
  int n_resync = 0, n_sp_switch = 0, n_dp_wr = 0, n_multi = 0, n_skew = 0;
  logic [11:0] last_sp = 0;
  always @(posedge clk) if (rst_n) begin
    n_srch_irq += (srch_irq[0] && !$past(srch_irq[0]));
    n_lock_irq += (cpu_irq && !$past(cpu_irq));
    if (dut.freq_ctl != '0) n_track++;
    if (pc_valid) begin if (pc_bit) n_pc_down++; else n_pc_up++; end
    n_resync += resync;
    if (dut.active_sp != last_sp) begin n_sp_switch++; last_sp = dut.active_sp; end
    n_dp_wr += dut.a_we;
    if (dut.c0_v && $countones(dut.comb_en & dut.running) >= 3) n_multi++;
    // a finger delivered a symbol while another had not yet delivered it
    if (dut.sym0_v[2] && !dut.sym0_v[0]) n_skew++;
  end

  function automatic bit near(int o, int d);
    return o >= (d + 30) / 4 - 1 && o <= (d + 30) / 4 + 1;
  endfunction

  // ---------------- bus tasks
  task automatic srch_wr(input logic [7:0] a, input logic [15:0] d);
    srch_cs = 2'b01; srch_we = 1; srch_addr = a; srch_wdata = d;
    @(posedge clk); #1 srch_cs = 0; srch_we = 0;
  endtask
  task automatic srch_rd(input logic [7:0] a, output logic [15:0] d);
    srch_cs = 2'b01; srch_we = 0; srch_addr = a;
    @(posedge clk); #1 srch_cs = 0; d = srch_rdata[0];
  endtask
  task automatic cpu_wr(input logic [7:0] a, input logic [15:0] d);
    cpu_cs = 1; cpu_we = 1; cpu_addr = a; cpu_wdata = d;
    @(posedge clk); #1 cpu_cs = 0; cpu_we = 0;
  endtask
  task automatic cpu_rd(input logic [7:0] a, output logic [15:0] d);
    cpu_cs = 1; cpu_we = 0; cpu_addr = a;
    @(posedge clk); #1 cpu_cs = 0; d = cpu_rdata;
  endtask
  task automatic start_finger(input int f, input int offset, input int sel);
    finger_sel[f] = 3'(sel);
    cpu_wr(8'(16 * f + 1), 16'(offset));
    cpu_wr(8'(16 * f + 2), 16'(offset >> 16));
    cpu_wr(8'(16 * f + 3), 16'h0605);       // DCCH: 64 chips, Walsh 5
    cpu_wr(8'(16 * f + 4), 16'h0402);       // FCH: 16 chips, Walsh 2
    cpu_wr(8'(16 * f + 5), 16'h1807);       // track, shift 8, pilot 128 chips
    cpu_wr(8'(16 * f + 9), 16'd30);         // lock threshold (1/16 units)
    cpu_wr(8'(16 * f + 0), 16'h0001);
  endtask

  // Find the DPRAM word sequence in a data pattern: returns the errors at the
  // best alignment.
  function automatic int best_errors(bit got [], bit pat []);
    int best = 1 << 30;
    for (int sh = 0; sh < pat.size(); sh++) begin
      int e = 0;
      foreach (got[i]) e += (got[i] != pat[(i + sh) % pat.size()]);
      if (e < best) best = e;
    end
    return best;
  endfunction

  initial begin
    logic [15:0] v, oC;
    int cand [3], cfing [3];
    int ncand, fA;
    logic [3:0] lk;
    init_codes();
    dA = new [64]; dB = new [64];
    foreach (dA[i]) dA[i] = 1'($urandom);
    foreach (dB[i]) dB[i] = 1'($urandom);
    finger_sel = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    ref_2s = 1; @(posedge clk); #1 ref_2s = 0;        // PN epoch now
    sp_valid = 1; setpoint = 12'd16; @(posedge clk); #1 sp_valid = 0;   // 1.0

    // 1. search
    srch_wr(8'h01, 16'h0030);               // group 0: input 0, group 1: input 3
    srch_wr(8'h02, 16'd160);                // 160 half chips
    srch_wr(8'h00, 16'h0001);
    while (!srch_irq[0]) @(posedge clk);
    #1;
    // DSP path selection: the four ranks of group 0 in order, dropping any
    // within one half chip of a stronger one (the same path seen twice)
    ncand = 0;
    for (int k = 0; k < 4; k++) begin
      bit dup;
      dup = 0;
      srch_rd(8'(8'h10 + 4 * k), v);
      for (int j = 0; j < ncand; j++)
        if (int'(v) <= cand[j] + 1 && int'(v) + 1 >= cand[j]) dup = 1;
      if (!dup && ncand < 3) begin cand[ncand] = int'(v); ncand++; end
    end
    srch_rd(8'h20, oC);
    srch_wr(8'h06, 16'h0);
    $display("search: antenna 0 candidates %0d %0d %0d; antenna 1 best %0d", cand[0], cand[1], cand[2], oC);
    begin
      bit fa, fb;
      fa = 0; fb = 0;
      for (int j = 0; j < ncand; j++) begin
        if (near(cand[j], DA)) fa = 1;
        if (near(cand[j], DB)) fb = 1;
      end
      check(fa, "path A among the search candidates of antenna 0");
      check(fb, "path B among the search candidates of antenna 0");
    end
    check(near(int'(oC), DC), "path found on antenna 1");

    // 2. verification: a finger on each candidate (fingers 0, 1, 3) and one
    // on antenna 1 (finger 2); the finger on path A starts one sample late on
    // purpose, so its tracking loop has to act.
    // Fingers that do not lock are stopped; the locked ones are combined.
    cfing = '{0, 1, 3};
    for (int j = 0; j < ncand; j++)
      start_finger(cfing[j], 4 * cand[j] - 35 + (near(cand[j], DA) ? 1 : 0), 0);
    start_finger(2, 4 * int'(oC) - 35, 3);
    while (!dut.running[0]) @(posedge clk);
    repeat (32 * 512) @(posedge clk); #1;
    lk = '0;
    for (int f = 0; f < 4; f++) begin
      cpu_rd(8'(16 * f), v);
      lk[f] = v[0] && v[1];
    end
    fA = -1;
    for (int j = 0; j < ncand; j++) begin
      bit real_path;
      real_path = near(cand[j], DA) || near(cand[j], DB);
      if (near(cand[j], DA)) fA = cfing[j];
      if (!real_path) n_reject += !lk[cfing[j]];
      check(lk[cfing[j]] == real_path, $sformatf("finger %0d on candidate %0d: locked %0d, real path %0d",
                                                 cfing[j], cand[j], lk[cfing[j]], real_path));
      if (!lk[cfing[j]]) cpu_wr(8'(16 * cfing[j]), 16'h0002);
    end
    check(lk[2], "finger 2 (antenna 1) running and locked");
    cpu_wr(8'h40, 16'(lk));
    cpu_wr(8'h41, 16'h000F);

    // 3. demodulated symbols through the DPRAM
    repeat (64 * 512) @(posedge clk); #1;
    begin
      bit g0 [], g1 [];
      int w0, w1, e0, e1;
      cpu_rd(8'h42, v); w0 = int'(v);
      cpu_rd(8'h43, v); w1 = int'(v);
      check(w0 >= 60 && w1 >= 240, $sformatf("symbols written: DCCH %0d FCH %0d", w0, w1));
      g0 = new [48]; g1 = new [192];
      foreach (g0[i]) begin
        dp_addr = 10'((w0 - 48 + i) % 512); @(posedge clk); #1;
        g0[i] = dp_rdata[7];       // sign of the imaginary part
      end
      foreach (g1[i]) begin
        dp_addr = 10'(512 + (w1 - 192 + i) % 512); @(posedge clk); #1;
        g1[i] = dp_rdata[7];
      end
      e0 = best_errors(g0, dA);
      e1 = best_errors(g1, dB);
      check(e0 == 0, $sformatf("DCCH symbol errors %0d of 48", e0));
      check(e1 == 0, $sformatf("FCH symbol errors %0d of 192", e1));
    end

    // 4. power control: set point 1.0 -> down; 250 -> up (after a frame)
    repeat (3 * FRAME_L * 8) @(posedge clk);
    sp_valid = 1; setpoint = 12'd4000; @(posedge clk); #1 sp_valid = 0;
    repeat (3 * FRAME_L * 8) @(posedge clk);
    cpu_rd(8'h46, v); check(v == 16'd4000, "new set point in use");
    // round trip delays: the tracked delay difference of the fingers on
    // paths A and C must equal the difference of the path delays
    if (fA >= 0) begin
      logic [15:0] r0, r1;
      int ra, rc;
      cpu_rd(8'(16 * fA + 11), r0); cpu_rd(8'(16 * fA + 12), r1); ra = int'({r1[1:0], r0});
      cpu_rd(8'(16 * 2 + 11), r0);  cpu_rd(8'(16 * 2 + 12), r1);  rc = int'({r1[1:0], r0});
      check(rc - ra >= DC - DA - 2 && rc - ra <= DC - DA + 2,
            $sformatf("round trip delays %0d and %0d differ by the path delays %0d", ra, rc, DC - DA));
    end
    // timing resync by a 20 ms reference out of step
    repeat (37) @(posedge clk); #1;
    ref_20ms = 1; @(posedge clk); #1 ref_20ms = 0;
    repeat (100) @(posedge clk);
    // loop-back: the fingers see no signal and lose lock
    loopback = 1;
    repeat (30 * 1024) @(posedge clk); #1;
    if (fA >= 0) begin
      cpu_rd(8'(16 * fA), v); check(v[0] == 1'b0, "finger on path A unlocked in loop-back");
    end

    $display("mechanisms: search irq %0d, lock irq %0d, tracking %0d, pc up %0d, pc down %0d, resync %0d, set point switch %0d, dpram writes %0d, 3-finger combines %0d, skewed symbols %0d, false candidates rejected %0d",
             n_srch_irq, n_lock_irq, n_track, n_pc_up, n_pc_down, n_resync, n_sp_switch, n_dp_wr, n_multi, n_skew, n_reject);
    check(n_srch_irq > 0, "search interrupt happened");
    check(n_lock_irq > 0, "lock interrupt happened");
    check(n_track > 0, "tracking loop acted");
    check(n_pc_up > 0, "power-up command happened");
    check(n_pc_down > 0, "power-down command happened");
    check(n_resync > 0, "timing resync happened");
    check(n_sp_switch >= 2, "set point switched at frame strobes");
    check(n_dp_wr > 0, "DPRAM written");
    check(n_multi > 0, "three fingers combined");
    check(n_skew > 0, "deskewing needed");
    finish_tb();
  end
endmodule
