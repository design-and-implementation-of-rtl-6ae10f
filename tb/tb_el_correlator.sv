// Testbench of el_correlator: chip strobes every 8 clocks with the PN chip
// changing after each strobe, tracking strobes 4 clocks later; the early
// (next chip) and late (current chip) energies over 16-chip periods are
// compared with a reference.
module tb_el_correlator;
  `include "tb_common.svh"
  logic clk = 0, rst_n = 0, clr = 0, chip_en = 0, trk_en = 0;
  logic signed [4:0] x_i = 0, x_q = 0;
  logic pn_i = 0, pn_q = 0;
  logic [29:0] e_early, e_late;
  logic e_valid;
  el_correlator #(.INT_CHIPS(16), .ACC_W(15)) dut (.*);
  always #5 clk = !clk;
  initial begin
    repeat (100000) @(posedge clk);
    check(0, "watchdog"); finish_tb();
  end
  bit ci [1000], cq [1000];
  initial begin
    int periods;
    for (int n = 0; n < 1000; n++) begin ci[n] = 1'($urandom); cq[n] = 1'($urandom); end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    clr = 1; @(posedge clk); #1 clr = 0;
    pn_i = ci[0]; pn_q = cq[0];
    periods = 0;
    for (int p = 0; p < 20; p++) begin
      longint ei, eq, li, lq, we, wl;
      ei = 0; eq = 0; li = 0; lq = 0;
      for (int c = 0; c < 16; c++) begin
        int n, xi, xq, a, b, a1, b1;
        n = p * 16 + c;
        // on-time strobe: generator shows c(n), then advances
        chip_en = 1; @(posedge clk); #1 chip_en = 0;
        pn_i = ci[n + 1]; pn_q = cq[n + 1];
        repeat (3) @(posedge clk); #1;
        xi = int'($urandom % 31) - 15; xq = int'($urandom % 31) - 15;
        x_i = 5'(xi); x_q = 5'(xq);
        a = ci[n + 1] ? -1 : 1; b = cq[n + 1] ? -1 : 1;
        a1 = ci[n] ? -1 : 1; b1 = cq[n] ? -1 : 1;
        ei += xi * a + xq * b;   eq += xq * a - xi * b;
        li += xi * a1 + xq * b1; lq += xq * a1 - xi * b1;
        trk_en = 1; @(posedge clk); #1 trk_en = 0;
        if (c == 15) begin
          we = ei * ei + eq * eq; wl = li * li + lq * lq;
          check(e_valid && longint'(e_early) == we && longint'(e_late) == wl,
                $sformatf("period %0d: %0d/%0d want %0d/%0d", p, e_early, e_late, we, wl));
          periods++;
        end else
          check(!e_valid, "no result inside a period");
        repeat (3) @(posedge clk); #1;
      end
    end
    check(periods == 20, "20 periods");
    finish_tb();
  end
endmodule
