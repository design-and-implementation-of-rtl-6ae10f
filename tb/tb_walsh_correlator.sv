// Testbench of walsh_correlator: random samples and PN chips, several Walsh
// codes and lengths; each symbol sum and symbol number is compared with a
// reference computed from the Walsh definition (-1)^popcount(w & k).
module tb_walsh_correlator;
  `include "tb_common.svh"
  logic clk = 0, rst_n = 0, clr = 0, chip_en = 0;
  logic signed [4:0] x_i = 0, x_q = 0;
  logic pn_i = 0, pn_q = 0;
  logic [14:0] chip_idx = 0;
  logic [7:0] walsh_idx = 0;
  logic [3:0] log2_len = 2;
  logic signed [14:0] acc_re, acc_im;
  logic [2:0] sym_idx;
  logic valid;
  int nsym = 0;
  walsh_correlator #(.MAX_LOG2(8)) dut (.*);
  always #5 clk = !clk;
  initial begin
    repeat (100000) @(posedge clk);
    check(0, "watchdog"); finish_tb();
  end
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cfg = 0; cfg < 8; cfg++) begin
      int L, w, start;
      longint sr, si;
      L = 2 + cfg % 7;
      w = int'($urandom % (1 << L));
      log2_len = 4'(L); walsh_idx = 8'(w);
      start = int'($urandom % 1000) << L;           // symbol aligned
      clr = 1; @(posedge clk); #1 clr = 0;
      sr = 0; si = 0;
      for (int n = 0; n < 6 * (1 << L); n++) begin
        int xi, xq, ci, cq, wc, k;
        xi = int'($urandom % 31) - 15; xq = int'($urandom % 31) - 15;
        pn_i = 1'($urandom); pn_q = 1'($urandom);
        ci = pn_i ? -1 : 1; cq = pn_q ? -1 : 1;
        k = (start + n) % (1 << L);
        wc = $countones(w & k) % 2 ? -1 : 1;
        sr += wc * (xi * ci + xq * cq);
        si += wc * (xq * ci - xi * cq);
        x_i = 5'(xi); x_q = 5'(xq); chip_idx = 15'(start + n); chip_en = 1;
        @(posedge clk); #1 chip_en = 0;
        if (k == (1 << L) - 1) begin
          check(valid && longint'(acc_re) == sr && longint'(acc_im) == si &&
                sym_idx == 3'((start + n) >> L),
                $sformatf("L=%0d w=%0d sym: %0d/%0d want %0d/%0d v=%0d", L, w, acc_re, acc_im, sr, si, valid));
          nsym++;
          sr = 0; si = 0;
        end else
          check(!valid, "no valid inside a symbol");
        if (n % 2) @(posedge clk);                     // irregular strobes
        #1;
      end
    end
    check(nsym == 48, $sformatf("%0d symbols", nsym));
    finish_tb();
  end
endmodule
