// Testbench of searcher: antenna 0 sector 1 carries a path delayed by D
// samples after the PN epoch, antenna 1 sector 0 carries a weaker copy
// delayed by D2; the other inputs carry noise. A search over a 64-half-chip
// window must rank the true offsets first in each group (the offset o of a
// path whose chip 0 starts D samples after the epoch is D = 4*o - 30, within
// the half-chip resolution of the search), raise the interrupt, and take
// 8 dwells of 128 chips plus 4 chips of slew each. The register read-back
// and the interrupt clear are checked too.
module tb_searcher;
  import wcdma_pkg::*;
  import tb_model_pkg::*;
  `include "tb_common.svh"
  logic clk = 0, rst_n = 0, epoch = 0, cs = 0, we = 0;
  logic [5:0][3:0] adc_i, adc_q;
  logic [7:0] addr = 0;
  logic [15:0] wdata = 0, rdata;
  logic irq;
  searcher dut (.*);
  always #5 clk = !clk;
  initial begin
    repeat (200000) @(posedge clk);
    check(0, "watchdog"); finish_tb();
  end
  bit data [];
  longint cyc = 0, ep = 0;
  int D, D2;
  always @(posedge clk) begin
    real re, im, r2, i2;
    cyc <= cyc + 1;
    sample_value(cyc + 1 - ep, D, 3.0, 6.0, 3, 6, data, 0.6, -0.8, re, im);
    sample_value(cyc + 1 - ep, D2, 1.5, 3.0, 3, 6, data, 1.0, 0.0, r2, i2);
    for (int k = 0; k < 6; k++) begin
      adc_i[k] <= 4'(adc(noise(3.0)));
      adc_q[k] <= 4'(adc(noise(3.0)));
    end
    adc_i[1] <= 4'(adc(re + noise(3.0)));
    adc_q[1] <= 4'(adc(im + noise(3.0)));
    adc_i[3] <= 4'(adc(r2 + noise(3.0)));
    adc_q[3] <= 4'(adc(i2 + noise(3.0)));
  end
  task automatic wr(input logic [7:0] a, input logic [15:0] d);
    cs = 1; we = 1; addr = a; wdata = d; @(posedge clk); #1 cs = 0; we = 0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [15:0] d);
    cs = 1; we = 0; addr = a; @(posedge clk); #1 cs = 0; d = rdata;
  endtask
  initial begin
    logic [15:0] v, o0, o1, e_lo, e_hi, o_2nd;
    longint t0, t1;
    init_codes();
    data = new [16];
    foreach (data[i]) data[i] = 1'($urandom);
    D = 4 * 21 - 30;        // offset 21
    D2 = 4 * 42 - 30;       // offset 42
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wr(8'h01, 16'h0031);    // group 0: input 1, group 1: input 3
    wr(8'h02, 16'd64);
    rd(8'h01, v); check(v == 16'h0031, "select read-back");
    rd(8'h02, v); check(v == 16'd64, "window read-back");
    wr(8'h00, 16'h0001);
    repeat (20) @(posedge clk); #1;
    rd(8'h00, v); check(v[0] == 1'b1, "busy after start");
    epoch = 1; ep = cyc; t0 = cyc; @(posedge clk); #1 epoch = 0;
    while (!irq) @(posedge clk);
    t1 = cyc;
    #1;
    $display("search took %0d clocks", t1 - t0);
    check(t1 - t0 >= 8 * 132 * 8 && t1 - t0 <= 8 * 132 * 8 + 40,
          $sformatf("search time %0d clocks for 8 dwells of 128+4 chips", t1 - t0));
    rd(8'h00, v); check(v == 16'h0002, "irq set, not busy");
    rd(8'h10, o0); rd(8'h11, e_lo); rd(8'h12, e_hi);
    rd(8'h14, o_2nd);
    rd(8'h20, o1);
    $display("group 0 best %0d (energy %0d), 2nd %0d; group 1 best %0d", o0, {e_hi, e_lo}, o_2nd, o1);
    check(o0 >= 16'd20 && o0 <= 16'd22, $sformatf("group 0 best offset %0d want 21 +- 1 half chip", o0));
    check(o1 >= 16'd41 && o1 <= 16'd43, $sformatf("group 1 best offset %0d want 42 +- 1 half chip", o1));
    check({e_hi, e_lo} > 32'd100000, "group 0 best energy well above noise");
    check(o_2nd == o0 - 1 || o_2nd == o0 + 1, $sformatf("second rank adjacent half chip (%0d)", o_2nd));
    wr(8'h06, 16'h0);
    @(posedge clk); #1 check(!irq, "irq cleared");
    finish_tb();
  end
endmodule
