// Early/late path correlator pair of the code tracking loop.
//
// The finger takes one on-time sample per chip ('chip_en', where the PN
// generator shows chip c(n) and then advances) and one tracking sample y(n)
// half a chip later ('trk_en'), when the generator already shows c(n+1).
// The tracking sample lies half a chip before the on-time instant of chip
// n+1 and half a chip after that of chip n, so
//   early = sum y(n) * conj(c(n+1))   (uses the generator's current chip)
//   late  = sum y(n) * conj(c(n))     (uses the chip stored at chip_en)
// Both are complex QPSK despreads integrated over INT_CHIPS chips; at the end
// of each period the energies I^2+Q^2 of both are registered and
// 'e_valid' pulses for one clock. One shared tracking sample spaced Tc/2 from
// the demodulation sample, and the sign-controlled add/subtract
// accumulation, follow the published design. INT_CHIPS (256) is this
// design's choice; the published design gives no tracking integration length.
module el_correlator
  import wcdma_pkg::*;
#(
  parameter int unsigned INT_CHIPS = 256,
  parameter int unsigned ACC_W     = 15
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    chip_en,
  input  logic                    trk_en,
  input  logic signed [SMP_W-1:0] x_i,
  input  logic signed [SMP_W-1:0] x_q,
  input  logic                    pn_i,
  input  logic                    pn_q,
  output logic [2*ACC_W-1:0]      e_early,
  output logic [2*ACC_W-1:0]      e_late,
  output logic                    e_valid
);
  logic prev_i, prev_q;                 // c(n), stored at chip_en
  logic signed [ACC_W-1:0] ei, eq, li, lq;
  logic [$clog2(INT_CHIPS)-1:0] cnt;
  cplx_t pe, pl;
  assign pe = despread(x_i, x_q, pn_i, pn_q);
  assign pl = despread(x_i, x_q, prev_i, prev_q);

  logic signed [ACC_W-1:0] nei, neq, nli, nlq;   // sums including this chip
  assign nei = ei + ACC_W'(pe.re);
  assign neq = eq + ACC_W'(pe.im);
  assign nli = li + ACC_W'(pl.re);
  assign nlq = lq + ACC_W'(pl.im);

  logic last;
  assign last = (cnt == $bits(cnt)'(INT_CHIPS - 1));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      prev_i <= 1'b0; prev_q <= 1'b0;
      ei <= '0; eq <= '0; li <= '0; lq <= '0;
      cnt <= '0;
      e_early <= '0; e_late <= '0; e_valid <= 1'b0;
    end else if (clr) begin
      ei <= '0; eq <= '0; li <= '0; lq <= '0;
      cnt <= '0;
      e_valid <= 1'b0;
    end else begin
      e_valid <= 1'b0;
      if (chip_en) begin
        prev_i <= pn_i;
        prev_q <= pn_q;
      end
      if (trk_en) begin
        if (last) begin
          // Close the period including this chip's products.
          e_early <= (2*ACC_W)'(nei * nei) + (2*ACC_W)'(neq * neq);
          e_late  <= (2*ACC_W)'(nli * nli) + (2*ACC_W)'(nlq * nlq);
          e_valid <= 1'b1;
          ei <= '0; eq <= '0; li <= '0; lq <= '0;
          cnt <= '0;
        end else begin
          ei <= nei;
          eq <= neq;
          li <= nli;
          lq <= nlq;
          cnt <= cnt + 1'b1;
        end
      end
    end
endmodule
