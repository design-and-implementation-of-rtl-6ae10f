// Testbench of power_control: four fingers deliver pilot estimates of
// known amplitude plus random noise; per power control group the command is
// compared with a reference SNR test, the set point takes effect only at the
// frame strobe, and both 'up' and 'down' commands occur.
module tb_power_control;
  `include "tb_common.svh"
  logic clk = 0, rst_n = 0, pcg = 0, frame = 0, sp_valid = 0;
  logic [3:0] enable = 4'b0111, p_valid = 0;
  logic signed [3:0][7:0] p_re, p_im;
  logic [11:0] setpoint = 0, active_setpoint;
  logic pc_bit, pc_valid;
  power_control #(.NF(4), .FRAC(4), .SP_W(12), .A_W(32)) dut (.*);
  always #5 clk = !clk;
  initial begin
    repeat (100000) @(posedge clk);
    check(0, "watchdog"); finish_tb();
  end
  int prv_re [4], prv_im [4];
  bit have [4];
  int n_up = 0, n_down = 0;
  initial begin
    p_re = '0; p_im = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // set point 8.0 (=128/16), effective at the first frame strobe
    setpoint = 12'd128; sp_valid = 1; @(posedge clk); #1 sp_valid = 0;
    check(active_setpoint == 0, "set point waits for the frame strobe");
    frame = 1; @(posedge clk); #1 frame = 0;
    check(active_setpoint == 12'd128, "set point active after the frame strobe");
    for (int g = 0; g < 40; g++) begin
      longint s, n2, lhs, rhs;
      int amp, nz;
      bit want;
      amp = 2 + (g % 8) * 6;          // sweeps the SNR through the set point
      nz  = 6;
      if (g == 20) begin
        setpoint = 12'd32; sp_valid = 1; @(posedge clk); #1 sp_valid = 0;
        frame = 1; @(posedge clk); #1 frame = 0;
        check(active_setpoint == 12'd32, "new set point after frame strobe");
      end
      s = 0; n2 = 0;
      for (int e = 0; e < 12; e++) begin
        for (int f = 0; f < 4; f++) begin
          int r, i;
          r = amp + int'($urandom % (2 * nz + 1)) - nz;
          i = amp / 2 + int'($urandom % (2 * nz + 1)) - nz;
          p_re[f] = 8'(r); p_im[f] = 8'(i);
          p_valid[f] = (e % 2 == 0) || f != 1;
          if (p_valid[f] && enable[f]) begin
            s += r * r + i * i;
            if (have[f]) n2 += (r - prv_re[f]) ** 2 + (i - prv_im[f]) ** 2;
            prv_re[f] = r; prv_im[f] = i; have[f] = 1;
          end
        end
        @(posedge clk); #1 p_valid = 0;
        repeat (3) @(posedge clk); #1;
      end
      pcg = 1; @(posedge clk); #1 pcg = 0;
      lhs = (2 * s - n2) * 16;
      rhs = longint'(active_setpoint) * n2;
      want = (n2 != 0) && (2 * s > n2) && (lhs > rhs);
      check(pc_valid && pc_bit == want, $sformatf("group %0d: bit %0d want %0d", g, pc_bit, want));
      if (want) n_down++; else n_up++;
    end
    check(n_up > 5 && n_down > 5, $sformatf("%0d up and %0d down commands", n_up, n_down));
    finish_tb();
  end
endmodule
