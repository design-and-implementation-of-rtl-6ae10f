// Testbench of deskew_combiner: four fingers deliver the same symbol stream
// with skews of up to 3.25 symbols; every combined symbol must be the sum of
// the four fingers' values for the same symbol number, in order. Then finger
// 2 drops out for ten symbols (forced combining of the other three) and
// later delivers one stale symbol (dropped as late).
module tb_deskew_combiner;
  import wcdma_pkg::*;
  `include "tb_common.svh"
  localparam int NS = 60, P = 40;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [3:0] enable = 4'hF, in_valid = 0;
  soft_sym_t [3:0] in_sym;
  logic signed [9:0] out_re, out_im;
  logic [2:0] out_idx;
  logic out_valid, forced, late;
  deskew_combiner #(.NF(4), .DEPTH(8)) dut (.*);
  always #5 clk = !clk;
  initial begin
    repeat (20000) @(posedge clk);
    check(0, "watchdog"); finish_tb();
  end
  int vre [4][NS], vim [4][NS];
  int dly [4] = '{0, 55, 130, 20};
  int n_out = 0, n_forced = 0, n_late = 0;
  int exp_k = 0;
  // Output checker
  always @(posedge clk) if (rst_n && out_valid) begin
    int sr, si;
    sr = 0; si = 0;
    for (int f = 0; f < 4; f++)
      if (!(f == 2 && exp_k >= 30 && exp_k < 40)) begin sr += vre[f][exp_k]; si += vim[f][exp_k]; end
    check(int'(out_re) == sr && int'(out_im) == si && out_idx == 3'(exp_k),
          $sformatf("symbol %0d: %0d/%0d idx %0d want %0d/%0d", exp_k, out_re, out_im, out_idx, sr, si));
    check(forced == (exp_k >= 30 && exp_k < 40), $sformatf("forced flag at symbol %0d", exp_k));
    n_out++; exp_k++;
  end
  always @(posedge clk) if (rst_n) begin n_forced += forced; n_late += late; end
  initial begin
    for (int f = 0; f < 4; f++)
      for (int k = 0; k < NS; k++) begin
        vre[f][k] = int'($urandom % 255) - 127; vim[f][k] = int'($urandom % 255) - 127;
      end
    in_sym = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < NS * P + 200; t++) begin
      in_valid = 0;
      for (int f = 0; f < 4; f++) begin
        int rel, k;
        rel = t - dly[f];
        k = rel / P;
        if (rel >= 0 && rel % P == 0 && k < NS && !(f == 2 && k >= 30 && k < 40)) begin
          in_valid[f] = 1;
          in_sym[f].re = 8'(vre[f][k]); in_sym[f].im = 8'(vim[f][k]); in_sym[f].idx = 3'(k);
        end
        // one stale symbol from finger 2 long after its slot was combined
        if (f == 2 && t == 45 * P + 7) begin
          in_valid[f] = 1; in_sym[f].re = 8'sd100; in_sym[f].im = 8'sd100; in_sym[f].idx = 3'(39);
        end
      end
      @(posedge clk); #1;
    end
    check(n_out >= NS - 4, $sformatf("%0d symbols combined", n_out));
    check(n_forced == 10, $sformatf("%0d forced combines", n_forced));
    check(n_late == 1, $sformatf("%0d late symbols", n_late));
    finish_tb();
  end
endmodule
