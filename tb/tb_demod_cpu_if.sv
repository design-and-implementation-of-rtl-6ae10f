// Testbench of demod_cpu_if, the finger register file.
//
// Writes random configurations into all four fingers, then reads every
// register back and compares both the read data and the cfg outputs with a
// shadow copy kept here. It also checks that start/stop are one-clock
// pulses, that lock-change flags latch, raise irq and clear per bit on a
// write to 0x41, that the forced/late counters count strobes, and that the
// status inputs (write pointers, set point, loop-filter output, round trip
// delay) read back.
module tb_demod_cpu_if;
  import wcdma_pkg::*;
  `include "tb_common.svh"
  localparam int NF = 4;
  logic clk = 0, rst_n = 0;
  logic cs = 0, we = 0;
  logic [7:0] addr = 0;
  logic [15:0] wdata = 0, rdata;
  logic irq;
  finger_cfg_t [NF-1:0] cfg;
  logic [NF-1:0] start, stop, comb_en;
  logic [NF-1:0][15:0] lock_thr;
  logic [NF-1:0] running = 4'b0101, locked = 4'b0011, lock_irq = 0;
  logic [NF-1:0][11:0] freq_ctl;
  logic [NF-1:0][17:0] rtd;
  logic [15:0] wr_ptr0 = 16'd123, wr_ptr1 = 16'd456, setpoint = 16'd789;
  logic forced = 0, late = 0;

  demod_cpu_if #(.NF(NF)) dut (.*);

  always #5 clk = !clk;
  initial begin
    repeat (20000) @(posedge clk);
    check(0, "watchdog"); finish_tb();
  end

  int n_start [NF], n_stop [NF];
  initial foreach (n_start[i]) begin n_start[i] = 0; n_stop[i] = 0; end
  always @(negedge clk) for (int i = 0; i < NF; i++) begin
    if (start[i]) n_start[i]++;
    if (stop[i])  n_stop[i]++;
  end

  task automatic wr(input logic [7:0] a, input logic [15:0] d);
    @(posedge clk); #1 cs = 1; we = 1; addr = a; wdata = d;
    @(posedge clk); #1 cs = 0; we = 0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [15:0] d);
    @(posedge clk); #1 cs = 1; we = 0; addr = a;
    @(posedge clk); #1 cs = 0; d = rdata;
  endtask

  logic [15:0] shadow [NF][16];
  initial begin
    logic [15:0] v, v2, exp;
    for (int f = 0; f < NF; f++) rtd[f] = 18'($urandom);
    freq_ctl[0] = 12'hFF0; freq_ctl[1] = 12'd5; freq_ctl[2] = 12'd0; freq_ctl[3] = 12'h800;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    check(cfg == '0 && irq == 0 && comb_en == 0, "reset state");
    // random configuration, three rounds so each register is overwritten
    for (int r = 0; r < 3; r++)
      for (int f = 0; f < NF; f++)
        for (int k = 1; k <= 9; k++) begin
          v = 16'($urandom);
          shadow[f][k] = v;
          wr(8'(16 * f + k), v);
        end
    for (int f = 0; f < NF; f++) begin
      check(cfg[f].offset == {shadow[f][2][1:0], shadow[f][1]}, $sformatf("cfg %0d offset", f));
      check(cfg[f].walsh0 == shadow[f][3][7:0] && cfg[f].log2_sf0 == shadow[f][3][11:8], $sformatf("cfg %0d DCCH", f));
      check(cfg[f].walsh1 == shadow[f][4][7:0] && cfg[f].log2_sf1 == shadow[f][4][11:8], $sformatf("cfg %0d FCH", f));
      check(cfg[f].log2_plt == shadow[f][5][3:0] && cfg[f].sym_shift == shadow[f][5][11:8] &&
            cfg[f].track_en == shadow[f][5][12], $sformatf("cfg %0d pilot/shift/track", f));
      check(cfg[f].long_mask == {shadow[f][8][9:0], shadow[f][7], shadow[f][6]}, $sformatf("cfg %0d long mask", f));
      check(lock_thr[f] == shadow[f][9], $sformatf("lock threshold %0d", f));
      for (int k = 1; k <= 9; k++) begin
        rd(8'(16 * f + k), v);
        unique case (k)
          2: exp = shadow[f][k] & 16'h0003;
          3, 4: exp = shadow[f][k] & 16'h0FFF;
          5: exp = shadow[f][k] & 16'h1F0F;
          8: exp = shadow[f][k] & 16'h03FF;
          default: exp = shadow[f][k];
        endcase
        check(v == exp, $sformatf("read back finger %0d reg %0d: %h vs %h", f, k, v, exp));
      end
      rd(8'(16 * f + 10), v);
      check(v == 16'(signed'(freq_ctl[f])), $sformatf("loop filter read %0d", f));
      rd(8'(16 * f + 11), v);
      exp = rtd[f][15:0];
      rd(8'(16 * f + 12), v2);
      check(v == exp && v2 == {14'd0, rtd[f][17:16]}, $sformatf("round trip delay read %0d", f));
      rd(8'(16 * f), v);
      check(v == {13'd0, 1'b0, running[f], locked[f]}, $sformatf("status %0d", f));
    end
    // start / stop pulses
    wr(8'h10, 16'h0001); wr(8'h30, 16'h0002); wr(8'h00, 16'h0003);
    repeat (2) @(posedge clk);
    check(n_start[0] == 1 && n_stop[0] == 1 && n_start[1] == 1 && n_stop[1] == 0 &&
          n_start[3] == 0 && n_stop[3] == 1 && n_start[2] == 0,
          $sformatf("start/stop pulses %0d%0d%0d%0d %0d%0d%0d%0d", n_start[0], n_start[1], n_start[2], n_start[3], n_stop[0], n_stop[1], n_stop[2], n_stop[3]));
    // combining enable
    wr(8'h40, 16'h000A); rd(8'h40, v);
    check(comb_en == 4'hA && v == 16'h000A, "combining enable");
    // lock-change flags and interrupt
    @(posedge clk); #1 lock_irq = 4'b0100; @(posedge clk); #1 lock_irq = 0;
    @(posedge clk); #1 lock_irq = 4'b0001; @(posedge clk); #1 lock_irq = 0;
    @(posedge clk); #1;
    check(irq == 1, "irq raised");
    rd(8'h41, v); check(v == 16'h0005, "flags latched");
    rd(8'h20, v); check(v[2] == 1'b1, "flag in finger status");
    wr(8'h41, 16'h0004); rd(8'h41, v);
    check(v == 16'h0001 && irq == 1, "one flag cleared");
    wr(8'h41, 16'h0001);
    @(posedge clk); #1;
    check(irq == 0, "irq released");
    // event counters
    for (int i = 0; i < 7; i++) begin @(posedge clk); #1 forced = 1; @(posedge clk); #1 forced = 0; end
    for (int i = 0; i < 3; i++) begin @(posedge clk); #1 late = 1; @(posedge clk); #1 late = 0; end
    rd(8'h44, v); check(v == 16'd7, "forced combine count");
    rd(8'h45, v); check(v == 16'd3, "late symbol count");
    rd(8'h42, v); check(v == 16'd123, "DCCH pointer");
    rd(8'h43, v); check(v == 16'd456, "FCH pointer");
    rd(8'h46, v); check(v == 16'd789, "set point");
    finish_tb();
  end
endmodule
