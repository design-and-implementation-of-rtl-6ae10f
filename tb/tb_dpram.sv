// Testbench of dpram: random writes through port A and reads through port B
// against a reference array; read latency one clock, old data on collision.
module tb_dpram;
  `include "tb_common.svh"
  logic clk = 0, a_we = 0;
  logic [9:0] a_addr = 0, b_addr = 0;
  logic [15:0] a_wdata = 0, b_rdata;
  logic [15:0] ref_mem [1024];
  dpram #(.AW(10), .DW(16)) dut (.*);
  always #5 clk = !clk;
  initial begin
    repeat (50000) @(posedge clk);
    check(0, "watchdog"); finish_tb();
  end
  initial begin
    for (int i = 0; i < 1024; i++) begin
      a_we = 1; a_addr = 10'(i); a_wdata = 16'(i * 7 + 3); ref_mem[i] = 16'(i * 7 + 3);
      @(posedge clk); #1;
    end
    a_we = 0;
    for (int t = 0; t < 3000; t++) begin
      logic [15:0] want;
      b_addr = 10'($urandom);
      a_we = 1'($urandom);
      a_addr = (t % 5 == 0) ? b_addr : 10'($urandom);
      a_wdata = 16'($urandom);
      want = ref_mem[b_addr];
      @(posedge clk); #1;
      if (a_we) ref_mem[a_addr] = a_wdata;
      check(b_rdata == want, $sformatf("read %0d got %h want %h", b_addr, b_rdata, want));
    end
    finish_tb();
  end
endmodule
