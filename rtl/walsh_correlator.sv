// Walsh-code channel correlator (pilot, DCCH or FCH/SCH).
//
// On every on-time chip ('chip_en') the sample is despread with the complex
// PN chip (re = xi*ci + xq*cq, im = xq*ci - xi*cq), multiplied by the chip of
// Walsh code 'walsh_idx' of length 2^log2_len and added to the I and Q
// accumulators. Chip k of Walsh code w is (-1)^popcount(w & k), k being
// the chip position inside the symbol. Symbols are aligned to the PN period:
// a symbol ends on the chip whose index (from the PN generator) has all
// log2_len low bits set. At that chip the complete sums appear on acc_re /
// acc_im with 'valid' for one clock, together with the symbol number
// (chip index >> log2_len, low three bits) used by the deskew buffers.
// The pilot uses Walsh code 0 and its length is the phase-estimation period.
// Despreading with PN and Walsh code and integrating over a symbol, with the
// add/subtract cross-talk removal, follows the published design; the Walsh
// construction, the alignment to the PN period and the widths are this
// design's choice. log2_len may be 2..MAX_LOG2.
module walsh_correlator
  import wcdma_pkg::*;
#(
  parameter int unsigned MAX_LOG2 = 8,
  parameter int unsigned ACC_W    = SMP_W + 2 + MAX_LOG2
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clr,
  input  logic                          chip_en,
  input  logic signed [SMP_W-1:0]       x_i,
  input  logic signed [SMP_W-1:0]       x_q,
  input  logic                          pn_i,
  input  logic                          pn_q,
  input  logic [CHIP_IDX_W-1:0]         chip_idx,
  input  logic [MAX_LOG2-1:0]           walsh_idx,
  input  logic [$clog2(MAX_LOG2+1)-1:0] log2_len,
  output logic signed [ACC_W-1:0]       acc_re,
  output logic signed [ACC_W-1:0]       acc_im,
  output logic [2:0]                    sym_idx,
  output logic                          valid
);
  logic [MAX_LOG2-1:0] pos_mask, pos;
  assign pos_mask = MAX_LOG2'((1 << log2_len) - 1);
  assign pos      = chip_idx[MAX_LOG2-1:0] & pos_mask;

  logic wchip, last;
  assign wchip = ^(walsh_idx & pos);        // 1 means -1
  assign last  = (pos == pos_mask);

  cplx_t p;
  logic signed [ACC_W-1:0] pr, pim, ar, ai;
  assign p   = despread(x_i, x_q, pn_i, pn_q);
  assign pr  = wchip ? -ACC_W'(p.re) : ACC_W'(p.re);
  assign pim = wchip ? -ACC_W'(p.im) : ACC_W'(p.im);

  logic [CHIP_IDX_W-1:0] sym_no;
  assign sym_no = chip_idx >> log2_len;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ar <= '0; ai <= '0;
      acc_re <= '0; acc_im <= '0; sym_idx <= '0; valid <= 1'b0;
    end else if (clr) begin
      ar <= '0; ai <= '0; valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (chip_en) begin
        if (last) begin
          acc_re  <= ar + pr;
          acc_im  <= ai + pim;
          sym_idx <= sym_no[2:0];
          valid   <= 1'b1;
          ar <= '0;
          ai <= '0;
        end else begin
          ar <= ar + pr;
          ai <= ai + pim;
        end
      end
    end
endmodule
