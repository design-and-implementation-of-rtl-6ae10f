// Testbench of data_mapper: every input select and every ADC code, checked
// against 2*code-15 one clock later; out-of-range selects give code 0.
module tb_data_mapper;
  `include "tb_common.svh"
  logic clk = 0, rst_n = 0;
  logic [2:0] sel;
  logic [5:0][3:0] adc_i, adc_q;
  logic signed [4:0] out_i, out_q;
  data_mapper dut (.*);
  always #5 clk = !clk;
  initial begin
    #100000; check(0, "watchdog"); finish_tb();
  end
  initial begin
    sel = 0; adc_i = '0; adc_q = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 8; s++)
      for (int c = 0; c < 16; c++) begin
        int ei, eq;
        for (int k = 0; k < 6; k++) begin
          adc_i[k] = 4'((c + 3 * k) % 16);
          adc_q[k] = 4'((15 - c + k) % 16);
        end
        sel = 3'(s);
        ei = (s < 6) ? 2 * ((c + 3 * s) % 16) - 15 : -15;
        eq = (s < 6) ? 2 * ((15 - c + s) % 16) - 15 : -15;
        @(posedge clk); #1;
        check(int'(out_i) == ei && int'(out_q) == eq,
              $sformatf("sel %0d code %0d: got %0d/%0d want %0d/%0d", s, c, out_i, out_q, ei, eq));
      end
    finish_tb();
  end
endmodule
