// Testbench of pn_gen: two full short-PN periods against the recurrence
// model (I and Q, chip index, inserted zero chip), the long code against the
// 42nd-degree recurrence for two masks, hold without 'adv', and 'load'.
module tb_pn_gen;
  import tb_model_pkg::*;
  `include "tb_common.svh"
  logic clk = 0, rst_n = 0, load = 0, adv = 0;
  logic [41:0] long_mask = '0;
  logic pn_i, pn_q;
  logic [14:0] chip_idx;
  pn_gen dut (.*);
  always #5 clk = !clk;
  initial begin
    repeat (200000) @(posedge clk);
    check(0, "watchdog"); finish_tb();
  end
  int lt[20] = '{35,33,31,27,26,25,22,21,19,18,17,16,10,7,6,5,3,2,1,0};
  bit lc [600];
  initial begin
    int bad;
    init_codes();
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Short codes over two periods.
    bad = 0;
    for (int n = 0; n < 2 * PERIOD; n++) begin
      #1;
      if (pn_i != short_i[n % PERIOD] || pn_q != short_q[n % PERIOD] ||
          chip_idx != 15'(n % PERIOD)) begin
        bad++;
        if (bad < 4) $display("chip %0d: got %b%b idx %0d", n, pn_i, pn_q, chip_idx);
      end
      if (n % 4096 == 4095) begin check(bad == 0, $sformatf("short PN up to chip %0d", n)); bad = 0; end
      adv = 1; @(posedge clk); #1 adv = 0;
    end
    // Hold: no advance without adv.
    #1; begin
      logic a, b; a = pn_i; b = pn_q;
      repeat (5) @(posedge clk);
      #1 check(pn_i == a && pn_q == b && chip_idx == 15'd0, "hold without adv");
    end
    // Long code for two masks: the masked output obeys the recurrence.
    for (int m = 0; m < 2; m++) begin
      long_mask = (m == 0) ? 42'h200_0000_0000 : 42'h15A_5A5A_C3C3;
      load = 1; @(posedge clk); #1 load = 0;
      for (int n = 0; n < 600; n++) begin
        #1 lc[n] = pn_i ^ short_i[n];
        check((pn_i ^ short_i[n]) == (pn_q ^ short_q[n]), "long code common to I and Q");
        adv = 1; @(posedge clk); #1 adv = 0;
      end
      bad = 0;
      for (int n = 0; n + 42 < 600; n++) begin
        bit r; r = 0;
        foreach (lt[k]) r ^= lc[n + lt[k]];
        if (r != lc[n + 42]) bad++;
      end
      check(bad == 0, $sformatf("long code recurrence, mask %0d (%0d bad)", m, bad));
      bad = 0;
      for (int n = 0; n < 600; n++) bad += lc[n];
      check(bad > 200 && bad < 400, "long code balanced");
    end
    // Load restarts at chip 0.
    repeat (77) begin adv = 1; @(posedge clk); #1; end
    adv = 0; long_mask = '0;
    load = 1; @(posedge clk); #1 load = 0; #1;
    check(chip_idx == 0 && pn_i == short_i[0] && pn_q == short_q[0], "load to epoch");
    finish_tb();
  end
endmodule
