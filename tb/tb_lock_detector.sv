// Testbench of lock_detector: lock after 4 consecutive estimates above the
// threshold, unlock after 8 consecutive below, interrupt on every change,
// isolated outliers ignored.
module tb_lock_detector;
  `include "tb_common.svh"
  logic clk = 0, rst_n = 0, clr = 0, e_valid = 0;
  logic [15:0] energy, threshold = 16'd1000;
  logic locked, irq;
  int irqs = 0;
  lock_detector #(.E_W(16), .LOCK_CNT(4), .UNLOCK_CNT(8)) dut (.*);
  always #5 clk = !clk;
  always @(posedge clk) if (rst_n && irq) irqs++;
  initial begin
    repeat (20000) @(posedge clk);
    check(0, "watchdog"); finish_tb();
  end
  task automatic est(input int e);
    energy = 16'(e); e_valid = 1; @(posedge clk); #1 e_valid = 0;
    repeat (3) @(posedge clk); #1;
  endtask
  initial begin
    energy = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(!locked, "starts unlocked");
    est(2000); est(2000); est(2000); est(10);       // outlier breaks the run
    check(!locked && irqs == 0, "3 above then 1 below: still unlocked");
    est(2000); est(2000); est(2000);
    check(!locked, "3 above: still unlocked");
    est(2000);
    check(locked && irqs == 1, "4 above: locked with one interrupt");
    repeat (7) est(10);
    est(5000);
    check(locked, "7 below then above: still locked");
    repeat (7) est(10);
    check(locked, "7 below: still locked");
    est(10);
    check(!locked && irqs == 2, "8 below: unlocked with a second interrupt");
    est(1000);
    est(1000); est(1000); est(1000);
    check(!locked, "equal to threshold is not above");
    finish_tb();
  end
endmodule
