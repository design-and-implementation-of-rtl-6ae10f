// Testbench of loop_filter: early-minus-late energy scaled by 2^-10 and
// clamped to +-256, updated only on err_valid, zero when disabled.
module tb_loop_filter;
  `include "tb_common.svh"
  logic clk = 0, rst_n = 0, enable = 1, err_valid = 0;
  logic [27:0] e_early, e_late;
  logic signed [11:0] freq_ctl;
  loop_filter #(.E_W(28), .SHIFT(10), .CTL_W(12), .LIMIT(256)) dut (.*);
  always #5 clk = !clk;
  initial begin
    repeat (20000) @(posedge clk);
    check(0, "watchdog"); finish_tb();
  end
  initial begin
    e_early = 0; e_late = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      longint d, w;
      logic signed [11:0] prev_ctl;
      e_early = 28'($urandom % (t % 2 ? 300000 : 100000000));
      e_late  = 28'($urandom % (t % 3 ? 300000 : 100000000));
      prev_ctl = freq_ctl;
      @(posedge clk); #1;
      check(freq_ctl == prev_ctl, "holds without err_valid");
      err_valid = 1; @(posedge clk); #1 err_valid = 0;
      d = longint'(e_early) - longint'(e_late);
      w = d >>> 10;
      if (w > 256) w = 256;
      if (w < -256) w = -256;
      check(longint'(freq_ctl) == w, $sformatf("diff %0d: ctl %0d want %0d", d, freq_ctl, w));
    end
    enable = 0; @(posedge clk); #1 check(freq_ctl == 0, "disabled gives zero");
    finish_tb();
  end
endmodule
