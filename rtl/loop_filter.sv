// Loop filter of the code tracking loop.
//
// Once per integration period ('err_valid') it takes the difference between
// the early and late path energies (early minus late), scales it down by 2^SHIFT and clamps it to
// +-LIMIT; the result is held on 'freq_ctl' for the NCO until the next
// period. This is a first-order (proportional) loop: while the local code is
// late relative to the received one (late energy larger) the NCO runs faster,
// and when the two energies balance the correction returns to zero.
// Feeding the early/late energy difference through a loop filter into the NCO
// follows the published design; the filter order, gain and clamp are this
// design's choice. 'enable' low forces freq_ctl to zero (loop open).
//
// Timing: freq_ctl changes one clock after err_valid.
module loop_filter #(
  parameter int unsigned E_W   = 28,
  parameter int unsigned SHIFT = 10,
  parameter int unsigned CTL_W = 12,
  parameter int          LIMIT = 256
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable,
  input  logic                    err_valid,
  input  logic [E_W-1:0]          e_early,
  input  logic [E_W-1:0]          e_late,
  output logic signed [CTL_W-1:0] freq_ctl
);
  logic signed [E_W:0] diff, scaled;
  assign diff   = signed'({1'b0, e_early}) - signed'({1'b0, e_late});
  assign scaled = diff >>> SHIFT;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)
      freq_ctl <= '0;
    else if (!enable)
      freq_ctl <= '0;
    else if (err_valid) begin
      if (scaled > (E_W+1)'(LIMIT))        freq_ctl <= CTL_W'(LIMIT);
      else if (scaled < -(E_W+1)'(LIMIT))  freq_ctl <= -CTL_W'(LIMIT);
      else                                 freq_ctl <= CTL_W'(scaled);
    end
endmodule
