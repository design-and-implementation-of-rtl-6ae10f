// Dual-port RAM between the symbol combiner and the DSP.
//
// Port A (combiner side) writes one word per clock; port B (DSP side) reads
// with one clock latency. Both ports share the clock. A write and a read of
// the same address in one clock return the old word. The published design only names
// the DPRAM that carries combined symbols to the DSP for deinterleaving; the
// size and the read latency are this design's choice.
module dpram #(
  parameter int unsigned AW = 10,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  input  logic [AW-1:0] b_addr,
  output logic [DW-1:0] b_rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    b_rdata <= mem[b_addr];
  end
endmodule
