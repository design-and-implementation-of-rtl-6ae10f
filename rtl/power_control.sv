// Reverse-link closed-loop power control decision.
//
// Every power control group (1.25 ms, 'pcg' strobe) the base station decides
// whether the mobile shall lower or raise its transmit power. During a group
// the unit collects, from the pilot phase estimates p(k) of all enabled
// fingers,
//   S = sum |p(k)|^2                       signal plus noise energy
//   N = sum |p(k) - p(k-1)|^2 / 2          noise energy (channel assumed
//                                          constant between estimates)
// and at the strobe commands 'down' (pc_bit = 1) when
//   (S - N) * 2^FRAC > setpoint * N,
// i.e. when the measured signal-to-noise ratio is above the set point,
// otherwise 'up' (pc_bit = 0). The set point is written by the base station
// controller ('sp_valid', linear ratio with FRAC fraction bits) and takes
// effect at the next frame strobe ('frame', every 20 ms). Comparing a
// per-group Eb/N0 estimate with the set point received every 20 ms follows
// the published design; the estimator and the number format are this
// design's choice (the Eb/N0 scale factor relative to the pilot SNR is folded
// into the set point).
//
// Timing: pc_valid pulses one clock after 'pcg'.
module power_control #(
  parameter int unsigned NF   = 4,
  parameter int unsigned FRAC = 4,
  parameter int unsigned SP_W = 12,
  parameter int unsigned A_W  = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    pcg,
  input  logic                    frame,
  input  logic [NF-1:0]           enable,
  input  logic [NF-1:0]           p_valid,
  input  logic signed [NF-1:0][7:0] p_re,
  input  logic signed [NF-1:0][7:0] p_im,
  input  logic                    sp_valid,
  input  logic [SP_W-1:0]         setpoint,
  output logic                    pc_bit,
  output logic                    pc_valid,
  output logic [SP_W-1:0]         active_setpoint
);
  logic signed [7:0] prev_re [NF];
  logic signed [7:0] prev_im [NF];
  logic [NF-1:0]     have_prev;
  logic [A_W-1:0]    s_acc, n2_acc;          // n2_acc holds 2N
  logic [SP_W-1:0]   pending_sp;

  logic [A_W-1:0] s_add, n2_add;
  always_comb begin
    s_add  = '0;
    n2_add = '0;
    for (int f = 0; f < NF; f++)
      if (p_valid[f] && enable[f]) begin
        automatic logic signed [7:0] r  = signed'(p_re[f]);
        automatic logic signed [7:0] i  = signed'(p_im[f]);
        automatic logic signed [8:0] dr = 9'(r) - 9'(prev_re[f]);
        automatic logic signed [8:0] di = 9'(i) - 9'(prev_im[f]);
        s_add = s_add + A_W'(16'(r * r) + 16'(i * i));
        if (have_prev[f])
          n2_add = n2_add + A_W'(18'(dr * dr) + 18'(di * di));
      end
  end

  // Decision on the totals including this clock's contributions.
  logic [A_W-1:0] s_tot, n2_tot;
  logic [A_W+SP_W+FRAC:0] lhs, rhs;
  assign s_tot  = s_acc + s_add;
  assign n2_tot = n2_acc + n2_add;
  // (S - N) * 2^FRAC > sp * N  <=>  (2S - 2N) * 2^FRAC > sp * 2N
  assign lhs = ((A_W+SP_W+FRAC+1)'(s_tot) * 2 - (A_W+SP_W+FRAC+1)'(n2_tot)) << FRAC;
  assign rhs = (A_W+SP_W+FRAC+1)'(active_setpoint) * (A_W+SP_W+FRAC+1)'(n2_tot);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int f = 0; f < NF; f++) begin prev_re[f] <= '0; prev_im[f] <= '0; end
      have_prev <= '0;
      s_acc <= '0; n2_acc <= '0;
      pc_bit <= 1'b0; pc_valid <= 1'b0;
      pending_sp <= '0; active_setpoint <= '0;
    end else begin
      pc_valid <= pcg;
      for (int f = 0; f < NF; f++)
        if (p_valid[f] && enable[f]) begin
          prev_re[f]   <= p_re[f];
          prev_im[f]   <= p_im[f];
          have_prev[f] <= 1'b1;
        end else if (!enable[f])
          have_prev[f] <= 1'b0;
      if (pcg) begin
        // A group without a noise sample counts as 'up'.
        pc_bit <= (n2_tot != '0) && (s_tot * 2 > n2_tot) && (lhs > rhs);
        s_acc  <= '0;
        n2_acc <= '0;
      end else begin
        s_acc  <= s_tot;
        n2_acc <= n2_tot;
      end
      if (sp_valid) pending_sp <= setpoint;
      if (frame)    active_setpoint <= sp_valid ? setpoint : pending_sp;
    end
endmodule
