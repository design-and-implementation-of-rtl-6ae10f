// Rake finger: code tracking and coherent data demodulation of one path.
//
// Decimator and PN generator: an NCO running at the sample clock (eight
// samples per chip) produces the chip strobe. At each strobe the current
// sample is the on-time (demodulation) sample and the PN generator advances;
// OSR/2 clocks later the next sample is taken as the tracking sample, so the
// tracking and demodulation samples are Tc/2 apart.
//
// Code tracking: the early/late correlator pair measures the energy of the
// tracking sample against the next and the current PN chip; the loop filter
// turns early-minus-late into an NCO frequency offset, which moves the chip
// strobe until both energies balance.
//
// Demodulation: the pilot correlator (Walsh code 0) integrates over 2^log2_plt
// chips; its sum divided by the length, kept with two fraction bits (units
// of 1/4 sample), is the phase estimate p. The DCCH and
// FCH/SCH correlators integrate over their symbol lengths and every symbol d
// is rotated by the conjugate estimate, z = d * conj(p)
// (re = dr*pr + di*pi, im = di*pr - dr*pi), scaled by 2^-sym_shift and
// saturated to 8 bits. The most recent completed estimate is used. The pilot
// energy |p|^2, in units of 1/16, goes to the lock detector.
//
// Round trip delay: 'rtd' is the number of clocks from the system PN epoch
// strobe to the on-time sample of the finger's chip 0, latched each time the
// finger passes chip 0 (once per PN period, and right after start-up). It is
// the path's code delay in samples, as tracked by the loop, and is what the
// controller reads to work out each path's delay. Right after start-up it
// equals cfg.offset + OSR + 2.
//
// Start-up: 'start' arms the finger; at the next PN epoch strobe 'epoch' it
// waits cfg.offset clocks, then restarts its PN generator at chip 0 and its
// NCO, so chip 0's on-time sample is the one OSR clocks later. 'stop'
// returns it to idle. The structure (decimator, PN generator, early/late
// correlators, loop filter, NCO, pilot, DCCH and FCH/SCH correlators,
// multiplication by the phase estimate) follows the published design; the
// start-up sequence, the averaging used as normalisation and all widths are
// this design's choice.
module finger
  import wcdma_pkg::*;
#(
  parameter int unsigned TRK_CHIPS = 256,
  parameter int unsigned LF_SHIFT  = 19,
  parameter int          LF_LIMIT  = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [SMP_W-1:0] x_i,
  input  logic signed [SMP_W-1:0] x_q,
  input  logic                    epoch,
  input  logic                    start,
  input  logic                    stop,
  input  finger_cfg_t             cfg,
  output logic                    running,
  output soft_sym_t               sym0,       // DCCH
  output logic                    sym0_valid,
  output soft_sym_t               sym1,       // FCH/SCH
  output logic                    sym1_valid,
  output logic signed [7:0]       plt_re,
  output logic signed [7:0]       plt_im,
  output logic                    plt_valid,
  output logic [15:0]             plt_energy,
  output logic signed [11:0]      freq_ctl,
  output logic [17:0]             rtd
);
  typedef enum logic [1:0] {IDLE, ARMED, WAIT, RUN} state_t;
  state_t state;
  logic [17:0] wcnt;
  logic restart;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= IDLE;
      wcnt  <= '0;
    end else if (stop) begin
      state <= IDLE;
    end else if (start) begin
      state <= ARMED;
    end else begin
      unique case (state)
        ARMED: if (epoch) begin
                 state <= WAIT;
                 wcnt  <= cfg.offset;
               end
        WAIT:  if (wcnt == '0) state <= RUN;
               else            wcnt <= wcnt - 1'b1;
        default: ;
      endcase
    end

  assign restart = (state == WAIT) && (wcnt == '0);
  assign running = (state == RUN);

  // ---------------- decimator: NCO chip strobe and tracking strobe
  logic chip_en_raw, chip_en, trk_en;
  logic [15:0] nco_phase;
  logic [OSR/2-1:0] dly;

  nco #(.ACC_W(16), .OSR(OSR), .CTL_W(12)) u_nco (
    .clk, .rst_n, .sync(restart || !running), .freq_ctl,
    .chip_en(chip_en_raw), .phase(nco_phase)
  );
  assign chip_en = chip_en_raw && running;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) dly <= '0;
    else        dly <= {dly[OSR/2-2:0], chip_en};
  assign trk_en = dly[OSR/2-1] && running;

  // ---------------- PN generator
  logic pn_i, pn_q;
  logic [CHIP_IDX_W-1:0] chip_idx;
  pn_gen u_pn (
    .clk, .rst_n, .load(restart), .adv(chip_en), .long_mask(cfg.long_mask),
    .pn_i, .pn_q, .chip_idx
  );

  // ---------------- round trip delay: clocks from the system PN epoch to
  // the on-time sample of this finger's chip 0, latched once per PN period
  logic [17:0] tcnt;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      tcnt <= '0; rtd <= '0;
    end else begin
      tcnt <= epoch ? 18'd1 : tcnt + 1'b1;
      if (chip_en && chip_idx == '0) rtd <= epoch ? '0 : tcnt;
    end

  // ---------------- code tracking loop
  logic [29:0] e_early, e_late;
  logic        e_valid;
  el_correlator #(.INT_CHIPS(TRK_CHIPS), .ACC_W(15)) u_el (
    .clk, .rst_n, .clr(restart), .chip_en, .trk_en, .x_i, .x_q, .pn_i, .pn_q,
    .e_early, .e_late, .e_valid
  );
  loop_filter #(.E_W(30), .SHIFT(LF_SHIFT), .CTL_W(12), .LIMIT(LF_LIMIT)) u_lf (
    .clk, .rst_n, .enable(cfg.track_en && running), .err_valid(e_valid),
    .e_early, .e_late, .freq_ctl
  );

  // ---------------- pilot and traffic correlators
  localparam int unsigned AW = SMP_W + 2 + 8;
  logic signed [AW-1:0] p_re, p_im, d0_re, d0_im, d1_re, d1_im;
  logic [2:0] p_idx, d0_idx, d1_idx;
  logic p_v, d0_v, d1_v;

  walsh_correlator #(.MAX_LOG2(8)) u_plt (
    .clk, .rst_n, .clr(restart), .chip_en, .x_i, .x_q, .pn_i, .pn_q, .chip_idx,
    .walsh_idx('0), .log2_len(cfg.log2_plt),
    .acc_re(p_re), .acc_im(p_im), .sym_idx(p_idx), .valid(p_v)
  );
  walsh_correlator #(.MAX_LOG2(8)) u_dcch (
    .clk, .rst_n, .clr(restart), .chip_en, .x_i, .x_q, .pn_i, .pn_q, .chip_idx,
    .walsh_idx(cfg.walsh0), .log2_len(cfg.log2_sf0),
    .acc_re(d0_re), .acc_im(d0_im), .sym_idx(d0_idx), .valid(d0_v)
  );
  walsh_correlator #(.MAX_LOG2(8)) u_fch (
    .clk, .rst_n, .clr(restart), .chip_en, .x_i, .x_q, .pn_i, .pn_q, .chip_idx,
    .walsh_idx(cfg.walsh1), .log2_len(cfg.log2_sf1),
    .acc_re(d1_re), .acc_im(d1_im), .sym_idx(d1_idx), .valid(d1_v)
  );

  // ---------------- phase estimate (average per chip) and its energy
  // The estimate keeps two fraction bits (units of 1/4 of a sample), which
  // makes its phase four times finer than a whole-sample average and still
  // fits 8 bits: |p| <= 4 * 30 = 120. The energy |p|^2 is then in units of
  // 1/16 and at most 2 * 120^2, within 16 bits.
  logic signed [AW+1:0] p_fine_re, p_fine_im;
  assign p_fine_re = ((AW+2)'(p_re) <<< 2) >>> cfg.log2_plt;
  assign p_fine_im = ((AW+2)'(p_im) <<< 2) >>> cfg.log2_plt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      plt_re <= '0; plt_im <= '0; plt_valid <= 1'b0; plt_energy <= '0;
    end else if (restart) begin
      plt_re <= '0; plt_im <= '0; plt_valid <= 1'b0;
    end else begin
      plt_valid <= p_v;
      if (p_v) begin
        plt_re     <= 8'(p_fine_re);
        plt_im     <= 8'(p_fine_im);
        plt_energy <= 16'(p_fine_re * p_fine_re) + 16'(p_fine_im * p_fine_im);
      end
    end

  // ---------------- coherent demodulation: d * conj(p)
  function automatic soft_sym_t rotate(input logic signed [AW-1:0] dr,
                                       input logic signed [AW-1:0] di,
                                       input logic signed [7:0] pr,
                                       input logic signed [7:0] pim,
                                       input logic [3:0] sh,
                                       input logic [2:0] idx);
    logic signed [31:0] zr, zi;
    soft_sym_t s;
    zr = (32'(dr) * 32'(pr) + 32'(di) * 32'(pim)) >>> sh;
    zi = (32'(di) * 32'(pr) - 32'(dr) * 32'(pim)) >>> sh;
    s.re  = sat_sym(zr);
    s.im  = sat_sym(zi);
    s.idx = idx;
    return s;
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sym0 <= '0; sym1 <= '0; sym0_valid <= 1'b0; sym1_valid <= 1'b0;
    end else begin
      sym0_valid <= d0_v && running;
      sym1_valid <= d1_v && running;
      if (d0_v) sym0 <= rotate(d0_re, d0_im, plt_re, plt_im, cfg.sym_shift, d0_idx);
      if (d1_v) sym1 <= rotate(d1_re, d1_im, plt_re, plt_im, cfg.sym_shift, d1_idx);
    end
endmodule
