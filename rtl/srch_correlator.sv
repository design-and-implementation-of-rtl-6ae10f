// Search correlator: one of the sixteen correlation blocks of the code
// acquisition module.
//
// For each 'en' pulse (one chip) it despreads the complex sample with the
// local QPSK PN chip (re = xi*ci + xq*cq, im = xq*ci - xi*cq) and adds the
// result to the I and Q accumulators; 'clr' together with 'en' starts a new
// dwell with this chip's product. On 'dump' the dwell energy I^2 + Q^2 is
// registered on 'energy' and 'energy_valid' pulses one clock later. The
// integrate-and-square structure follows the published design; the
// accumulator width is this design's choice (ACC_W = 14 holds 256 chips of
// full-scale samples).
module srch_correlator
  import wcdma_pkg::*;
#(
  parameter int unsigned ACC_W = 14
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    clr,
  input  logic                    dump,
  input  logic signed [SMP_W-1:0] x_i,
  input  logic signed [SMP_W-1:0] x_q,
  input  logic                    pn_i,
  input  logic                    pn_q,
  output logic [2*ACC_W-1:0]      energy,
  output logic                    energy_valid
);
  logic signed [ACC_W-1:0] acc_i, acc_q;
  cplx_t p;
  assign p = despread(x_i, x_q, pn_i, pn_q);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      acc_i <= '0;
      acc_q <= '0;
      energy <= '0;
      energy_valid <= 1'b0;
    end else begin
      energy_valid <= dump;
      if (dump)
        energy <= (2*ACC_W)'(acc_i * acc_i) + (2*ACC_W)'(acc_q * acc_q);
      if (en) begin
        acc_i <= (clr ? '0 : acc_i) + ACC_W'(p.re);
        acc_q <= (clr ? '0 : acc_q) + ACC_W'(p.im);
      end
    end
endmodule
