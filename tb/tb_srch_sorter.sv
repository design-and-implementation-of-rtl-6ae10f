// Testbench of srch_sorter: random candidate lists (with repeated energies)
// are fed one per clock, and the four kept entries are compared with a
// reference stable sort; 'clr' empties the list.
module tb_srch_sorter;
  `include "tb_common.svh"
  logic clk = 0, rst_n = 0, clr = 0, in_valid = 0;
  logic [27:0] in_energy;
  logic [15:0] in_offset;
  logic [3:0][27:0] best_energy;
  logic [3:0][15:0] best_offset;
  srch_sorter #(.NUM_BEST(4), .E_W(28), .OFF_W(16)) dut (.*);
  always #5 clk = !clk;
  initial begin
    repeat (50000) @(posedge clk);
    check(0, "watchdog"); finish_tb();
  end
  initial begin
    in_energy = 0; in_offset = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      int n;
      longint re [4]; int ro [4];
      n = 1 + int'($urandom % 40);
      for (int k = 0; k < 4; k++) begin re[k] = 0; ro[k] = 0; end
      clr = 1; @(posedge clk); #1 clr = 0;
      for (int i = 0; i < n; i++) begin
        longint e;
        e = longint'($urandom % ((t % 2) ? 8 : 100000)) + 1;
        in_energy = 28'(e); in_offset = 16'(i); in_valid = 1;
        // reference: insert below equal energies
        for (int k = 0; k < 4; k++)
          if (e > re[k]) begin
            for (int m = 3; m > k; m--) begin re[m] = re[m-1]; ro[m] = ro[m-1]; end
            re[k] = e; ro[k] = i;
            break;
          end
        @(posedge clk); #1 in_valid = 0;
      end
      for (int k = 0; k < 4; k++)
        check(longint'(best_energy[k]) == re[k] && (re[k] == 0 || int'(best_offset[k]) == ro[k]),
              $sformatf("trial %0d rank %0d: %0d@%0d want %0d@%0d", t, k,
                        best_energy[k], best_offset[k], re[k], ro[k]));
    end
    finish_tb();
  end
endmodule
