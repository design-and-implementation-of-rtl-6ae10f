// Deskewing buffers and symbol combiner of the rake receiver.
//
// Paths arrive with different delays, so the fingers deliver the same
// transmitted symbol at different times. Every finger writes its soft symbols
// into its own DEPTH-entry deskewing buffer at the slot given by the symbol
// number (sym.idx), and marks the slot valid. The combiner reads slot 'rd'
// when every enabled finger has written it, adds the symbols of all enabled
// fingers (maximal-ratio weighting is already in them, since each finger
// multiplies by its own phase estimate) and advances 'rd'. Because a finger's
// symbol number comes from its own PN timing, the delay of each path is
// compensated without a separate delay setting.
//
// A finger that falls out (or is far behind) must not stall the others: as
// soon as some enabled finger has written the slot DEPTH/2 symbols ahead of
// 'rd', slot 'rd' is combined with what it holds and 'forced' pulses. A
// finger writing more than DEPTH/2 slots ahead of 'rd' is treated as late and
// its symbol is dropped ('late' pulses). The first symbol written after reset
// or 'clr' sets 'rd'. Per-finger buffers of eight symbols aligned by symbol
// number follow the published design; the forced read, the late-symbol rule
// and the widths are this design's choice.
//
// Timing: out_valid comes one clock after the write that completes a slot.
module deskew_combiner
  import wcdma_pkg::*;
#(
  parameter int unsigned NF    = NUM_FINGERS,
  parameter int unsigned DEPTH = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clr,
  input  logic [NF-1:0]             enable,
  input  logic [NF-1:0]             in_valid,
  input  soft_sym_t [NF-1:0]        in_sym,
  output logic signed [SYM_W+1:0]   out_re,
  output logic signed [SYM_W+1:0]   out_im,
  output logic [2:0]                out_idx,
  output logic                      out_valid,
  output logic                      forced,
  output logic                      late
);
  localparam int unsigned IW = $clog2(DEPTH);

  logic signed [SYM_W-1:0] buf_re [NF][DEPTH];
  logic signed [SYM_W-1:0] buf_im [NF][DEPTH];
  logic [DEPTH-1:0]        vld    [NF];
  logic [IW-1:0]           rd;
  logic                    started;

  // Slot distance of each write from the read slot.
  logic [NF-1:0] wr_ok, wr_late;
  always_comb
    for (int f = 0; f < NF; f++) begin
      automatic logic [IW-1:0] ahead = IW'(in_sym[f].idx) - rd;
      wr_ok[f]   = in_valid[f] && enable[f] && (!started || ahead <= IW'(DEPTH/2));
      wr_late[f] = in_valid[f] && enable[f] && started && ahead > IW'(DEPTH/2);
    end

  // Slot rd is complete when every enabled finger has it; it is forced when
  // some enabled finger is DEPTH/2 slots ahead.
  logic all_in, any_ahead, do_read;
  always_comb begin
    all_in    = |enable;
    any_ahead = 1'b0;
    for (int f = 0; f < NF; f++) begin
      if (enable[f] && !vld[f][rd]) all_in = 1'b0;
      if (enable[f] && vld[f][IW'(rd + IW'(DEPTH/2))]) any_ahead = 1'b1;
    end
    do_read = started && (all_in || any_ahead);
  end

  logic signed [SYM_W+1:0] sum_re, sum_im;
  always_comb begin
    sum_re = '0;
    sum_im = '0;
    for (int f = 0; f < NF; f++)
      if (enable[f] && vld[f][rd]) begin
        sum_re = sum_re + (SYM_W+2)'(buf_re[f][rd]);
        sum_im = sum_im + (SYM_W+2)'(buf_im[f][rd]);
      end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int f = 0; f < NF; f++) vld[f] <= '0;
      rd <= '0; started <= 1'b0;
      out_re <= '0; out_im <= '0; out_idx <= '0;
      out_valid <= 1'b0; forced <= 1'b0; late <= 1'b0;
    end else if (clr) begin
      for (int f = 0; f < NF; f++) vld[f] <= '0;
      started <= 1'b0;
      out_valid <= 1'b0; forced <= 1'b0; late <= 1'b0;
    end else begin
      out_valid <= do_read;
      forced    <= do_read && !all_in;
      late      <= |wr_late;
      if (do_read) begin
        out_re  <= sum_re;
        out_im  <= sum_im;
        out_idx <= 3'(rd);
        rd      <= rd + 1'b1;
        for (int f = 0; f < NF; f++) vld[f][rd] <= 1'b0;
      end
      for (int f = 0; f < NF; f++)
        if (wr_ok[f] && !(do_read && IW'(in_sym[f].idx) == rd)) begin
          vld[f][IW'(in_sym[f].idx)]    <= 1'b1;
          buf_re[f][IW'(in_sym[f].idx)] <= in_sym[f].re;
          buf_im[f][IW'(in_sym[f].idx)] <= in_sym[f].im;
        end
      if (!started && |wr_ok) begin
        started <= 1'b1;
        for (int f = NF - 1; f >= 0; f--)
          if (wr_ok[f]) rd <= IW'(in_sym[f].idx);
      end
    end
endmodule
