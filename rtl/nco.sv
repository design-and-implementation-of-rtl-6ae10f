// Numerically controlled oscillator of the code tracking loop.
//
// A phase accumulator advanced once per sample clock by NOMINAL + freq_ctl.
// With NOMINAL = 2^ACC_W / OSR the accumulator wraps once every OSR clocks,
// i.e. once per chip; each wrap is the chip strobe 'chip_en' that clocks the
// finger's PN generator and selects the on-time sample in the decimator. A
// positive freq_ctl makes the strobes come sooner (the local code speeds up),
// a negative one delays them. 'sync' clears the accumulator so that the
// next strobe comes exactly OSR clocks later. Using an NCO whose output clocks
// the PN generator and the decimator follows the published design; the
// accumulator width is this design's choice.
//
// Timing: 'chip_en' is registered and high for one clock per wrap.
module nco #(
  parameter int unsigned ACC_W = 16,
  parameter int unsigned OSR   = 8,
  parameter int unsigned CTL_W = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    sync,
  input  logic signed [CTL_W-1:0] freq_ctl,
  output logic                    chip_en,
  output logic [ACC_W-1:0]        phase
);
  localparam logic [ACC_W:0] NOMINAL = (ACC_W+1)'((1 << ACC_W) / OSR);

  // freq_ctl is far smaller than NOMINAL (the loop filter clamps it), so the
  // step is always positive and below 2^ACC_W.
  logic signed [ACC_W+1:0] step;
  logic [ACC_W:0]          sum;
  assign step = signed'({1'b0, NOMINAL}) + (ACC_W+2)'(freq_ctl);
  assign sum  = {1'b0, phase} + {1'b0, step[ACC_W-1:0]};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      phase   <= '0;
      chip_en <= 1'b0;
    end else if (sync) begin
      phase   <= '0;
      chip_en <= 1'b0;
    end else begin
      phase   <= sum[ACC_W-1:0];
      chip_en <= sum[ACC_W];
    end
endmodule
