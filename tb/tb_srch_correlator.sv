// Testbench of srch_correlator: random samples and PN chips over dwells of
// 128 chips; the energy is compared with a reference despread-and-square.
module tb_srch_correlator;
  `include "tb_common.svh"
  logic clk = 0, rst_n = 0, en = 0, clr = 0, dump = 0;
  logic signed [4:0] x_i, x_q;
  logic pn_i, pn_q;
  logic [27:0] energy;
  logic energy_valid;
  srch_correlator #(.ACC_W(14)) dut (.*);
  always #5 clk = !clk;
  initial begin
    repeat (20000) @(posedge clk);
    check(0, "watchdog"); finish_tb();
  end
  initial begin
    x_i = 0; x_q = 0; pn_i = 0; pn_q = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int d = 0; d < 20; d++) begin
      longint ai, aq, e;
      ai = 0; aq = 0;
      for (int n = 0; n < 128; n++) begin
        int xi, xq, ci, cq;
        xi = int'($urandom % 31) - 15;
        xq = int'($urandom % 31) - 15;
        if (d % 4 == 0) begin xi = 15; xq = -15; end     // full scale
        pn_i = 1'($urandom); pn_q = 1'($urandom);
        ci = pn_i ? -1 : 1; cq = pn_q ? -1 : 1;
        ai += xi * ci + xq * cq;
        aq += xq * ci - xi * cq;
        x_i = 5'(xi); x_q = 5'(xq);
        en = 1; clr = (n == 0);
        if (n % 3 == 2) begin   // gaps between chips
          en = 0; @(posedge clk); #1; en = 1;
        end
        @(posedge clk); #1;
        en = 0; clr = 0;
      end
      dump = 1; @(posedge clk); #1 dump = 0;
      #0 check(energy_valid == 1'b1, "energy_valid one clock after dump");
      e = ai * ai + aq * aq;
      check(longint'(energy) == e, $sformatf("dwell %0d energy %0d want %0d", d, energy, e));
      @(posedge clk); #1 check(energy_valid == 1'b0, "energy_valid is a pulse");
    end
    finish_tb();
  end
endmodule
