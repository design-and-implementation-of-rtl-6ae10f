// Shared constants and types of the wideband CDMA base-station demodulator.
// The sampling numbers (8x oversampling of a 3.6864 Mcps chip stream by a
// 29.4912 MHz system clock, 4-bit ADC, mapped samples in -15..15, 16 search
// correlators, 4 sorted search results, 4 fingers, 8-symbol deskew buffers,
// 128-chip search integration, 1.25 ms power control groups and 20 ms frames)
// follow the published design. The widths derived from them are this design's
// own choice.
package wcdma_pkg;
  localparam int unsigned OSR          = 8;       // samples per chip
  localparam int unsigned ADC_W        = 4;       // ADC code width
  localparam int unsigned SMP_W        = 5;       // mapped sample, -15..15
  localparam int unsigned NUM_RX       = 6;       // 2 antennas x 3 sectors
  localparam int unsigned SEL_W        = 3;
  localparam int unsigned SHORT_LEN    = 15;      // short PN register length
  localparam int unsigned LONG_LEN     = 42;      // long PN register length
  localparam int unsigned CHIP_IDX_W   = SHORT_LEN;
  localparam int unsigned PCG_CHIPS    = 4608;    // 1.25 ms at 3.6864 Mcps
  localparam int unsigned FRAME_CHIPS  = 73728;   // 20 ms at 3.6864 Mcps
  localparam int unsigned SYM_W        = 8;       // soft symbol width
  localparam int unsigned NUM_FINGERS  = 4;

  // Soft symbol with the symbol number used by the deskew buffers.
  typedef struct packed {
    logic signed [SYM_W-1:0] re;
    logic signed [SYM_W-1:0] im;
    logic [2:0]              idx;   // symbol number modulo the buffer depth
  } soft_sym_t;

  // Complex despreading product r * conj(c) with c = (1-2*pn_i) + j(1-2*pn_q):
  // re = xi*ci + xq*cq, im = xq*ci - xi*cq. Removes the I/Q cross-talk of
  // QPSK spreading by adding and subtracting the I and Q samples.
  typedef struct packed {
    logic signed [SMP_W+1:0] re;
    logic signed [SMP_W+1:0] im;
  } cplx_t;

  function automatic cplx_t despread(input logic signed [SMP_W-1:0] xi,
                                     input logic signed [SMP_W-1:0] xq,
                                     input logic pn_i, input logic pn_q);
    logic signed [SMP_W+1:0] a, b;
    cplx_t r;
    a = pn_i ? -(SMP_W+2)'(xi) : (SMP_W+2)'(xi);   // xi*ci
    b = pn_q ? -(SMP_W+2)'(xq) : (SMP_W+2)'(xq);   // xq*cq
    r.re = a + b;
    a = pn_i ? -(SMP_W+2)'(xq) : (SMP_W+2)'(xq);   // xq*ci
    b = pn_q ? -(SMP_W+2)'(xi) : (SMP_W+2)'(xi);   // xi*cq
    r.im = a - b;
    return r;
  endfunction

  // Per-finger configuration written by the controller.
  typedef struct packed {
    logic [LONG_LEN-1:0] long_mask;   // long-code mask of the mobile
    logic [17:0]         offset;      // code phase in samples after the PN epoch
    logic [7:0]          walsh0;      // DCCH Walsh code
    logic [3:0]          log2_sf0;    // DCCH symbol length, log2 chips
    logic [7:0]          walsh1;      // FCH/SCH Walsh code
    logic [3:0]          log2_sf1;    // FCH/SCH symbol length, log2 chips
    logic [3:0]          log2_plt;    // pilot phase-estimation length, log2 chips
    logic [3:0]          sym_shift;   // soft-symbol scaling, right shift
    logic                track_en;    // close the code tracking loop
  } finger_cfg_t;

  // Saturate a wide signed value to SYM_W bits.
  function automatic logic signed [SYM_W-1:0] sat_sym(input logic signed [31:0] v);
    if (v > 32'sd127)       return 8'sd127;
    else if (v < -32'sd127) return -8'sd127;
    else                    return v[SYM_W-1:0];
  endfunction
endpackage
