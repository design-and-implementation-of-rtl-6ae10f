// Base-station channel card demodulator for a wideband DS-CDMA reverse link
// (3.6864 Mcps, QPSK spreading with short and long PN codes, continuous pilot).
//
// Data path: the received 4-bit I/Q samples of two antennas times three
// sectors (8 samples per chip at 29.4912 MHz) pass the data selector, which
// can switch to a loop-back input. NUM_SRCH searchers (code acquisition)
// search code phases and report the four best per antenna group to the DSP.
// Four fingers (code tracking and coherent demodulation) each follow one
// path, chosen by the DSP from the search results; each finger selects its
// own input through a data mapper. Per code channel (DCCH and FCH/SCH) a
// deskew combiner aligns the fingers' symbols by symbol number and adds them;
// the combined symbols are written to the DPRAM, from which the DSP reads
// them for deinterleaving. Lock detectors watch the fingers' pilot energy
// and interrupt the DSP. The power control unit turns the fingers' pilot
// estimates into one up/down command per 1.25 ms group, against the set point
// the base station controller sends every 20 ms.
//
// External parts are reached through ports: the DSP through the searcher
// buses (srch_*), the demodulator register bus (cpu_*) and the DPRAM read port
// (dp_*); the base station controller through the set point; the forward-link
// modulator through pc_bit.
//
// DPRAM layout: DCCH symbols at 0..511, FCH/SCH symbols at 512..1023, each a
// ring; word = {re[7:0], im[7:0]}, the combined sums saturated to 8 bits.
// A DCCH and an FCH/SCH symbol completing in the same clock are written in
// consecutive clocks.
//
// The block structure (data selector and timing generator, searchers,
// fingers with tracking loop and three correlators, combiner, DPRAM, DSP
// interfaces, lock detector, power control) follows the published design;
// the wiring details, the register maps and the DPRAM layout are this
// design's choice.
module channel_card
  import wcdma_pkg::*;
#(
  parameter int unsigned NUM_SRCH  = 2,
  parameter int unsigned NF        = NUM_FINGERS,
  parameter int unsigned PCG_LEN   = PCG_CHIPS,
  parameter int unsigned FRAME_LEN = FRAME_CHIPS
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // received and loop-back samples, reference pulses
  input  logic [NUM_RX-1:0][ADC_W-1:0]  rx_i,
  input  logic [NUM_RX-1:0][ADC_W-1:0]  rx_q,
  input  logic [NUM_RX-1:0][ADC_W-1:0]  lb_i,
  input  logic [NUM_RX-1:0][ADC_W-1:0]  lb_q,
  input  logic                          loopback,
  input  logic                          ref_20ms,
  input  logic                          ref_2s,
  // searcher DSP buses
  input  logic [NUM_SRCH-1:0]           srch_cs,
  input  logic                          srch_we,
  input  logic [7:0]                    srch_addr,
  input  logic [15:0]                   srch_wdata,
  output logic [NUM_SRCH-1:0][15:0]     srch_rdata,
  output logic [NUM_SRCH-1:0]           srch_irq,
  // demodulator register bus
  input  logic                          cpu_cs,
  input  logic                          cpu_we,
  input  logic [7:0]                    cpu_addr,
  input  logic [15:0]                   cpu_wdata,
  output logic [15:0]                   cpu_rdata,
  output logic                          cpu_irq,
  // per-finger input select (antenna*3 + sector)
  input  logic [NF-1:0][2:0]            finger_sel,
  // DPRAM read port (DSP side)
  input  logic [9:0]                    dp_addr,
  output logic [15:0]                   dp_rdata,
  // power control
  input  logic                          sp_valid,
  input  logic [11:0]                   setpoint,
  output logic                          pc_bit,
  output logic                          pc_valid,
  // timing
  output logic                          pcg,
  output logic                          frame,
  output logic                          epoch,
  output logic                          resync
);
  // ---------------- data selector and timing
  logic [NUM_RX-1:0][ADC_W-1:0] d_i, d_q;
  logic chip;
  timing_gen #(.PCG_LEN(PCG_LEN), .FRAME_LEN(FRAME_LEN)) u_tg (
    .clk, .rst_n, .loopback, .rx_i, .rx_q, .lb_i, .lb_q, .ref_20ms, .ref_2s,
    .data_i(d_i), .data_q(d_q), .chip, .pcg, .frame, .epoch, .resync);

  // ---------------- searchers
  for (genvar s = 0; s < NUM_SRCH; s++) begin : g_srch
    searcher u_srch (
      .clk, .rst_n, .adc_i(d_i), .adc_q(d_q), .epoch,
      .cs(srch_cs[s]), .we(srch_we), .addr(srch_addr), .wdata(srch_wdata),
      .rdata(srch_rdata[s]), .irq(srch_irq[s]));
  end

  // ---------------- register interface
  finger_cfg_t [NF-1:0] cfg;
  logic [NF-1:0] f_start, f_stop, comb_en, running, locked, lock_irq;
  logic [NF-1:0][15:0] lock_thr;
  logic [NF-1:0][11:0] freq_ctl;
  logic [NF-1:0][17:0] rtd;
  logic [15:0] wr_ptr0, wr_ptr1;
  logic forced0, forced1, late0, late1;
  logic [11:0] active_sp;

  demod_cpu_if #(.NF(NF)) u_cpu (
    .clk, .rst_n, .cs(cpu_cs), .we(cpu_we), .addr(cpu_addr), .wdata(cpu_wdata),
    .rdata(cpu_rdata), .irq(cpu_irq), .cfg, .start(f_start), .stop(f_stop),
    .lock_thr, .comb_en, .running, .locked, .lock_irq, .freq_ctl,
    .rtd, .wr_ptr0, .wr_ptr1, .forced(forced0 || forced1), .late(late0 || late1),
    .setpoint(16'(active_sp)));

  // ---------------- fingers and lock detectors
  soft_sym_t [NF-1:0] sym0, sym1;
  logic [NF-1:0] sym0_v, sym1_v, plt_v;
  logic signed [NF-1:0][7:0] plt_re, plt_im;
  logic [NF-1:0][15:0] plt_e;

  for (genvar f = 0; f < NF; f++) begin : g_fing
    logic signed [SMP_W-1:0] x_i, x_q;
    logic signed [11:0] fc;
    data_mapper u_map (.clk, .rst_n, .sel(finger_sel[f]), .adc_i(d_i), .adc_q(d_q),
                       .out_i(x_i), .out_q(x_q));
    finger u_finger (
      .clk, .rst_n, .x_i, .x_q, .epoch, .start(f_start[f]), .stop(f_stop[f]),
      .cfg(cfg[f]), .running(running[f]),
      .sym0(sym0[f]), .sym0_valid(sym0_v[f]), .sym1(sym1[f]), .sym1_valid(sym1_v[f]),
      .plt_re(plt_re[f]), .plt_im(plt_im[f]), .plt_valid(plt_v[f]),
      .plt_energy(plt_e[f]), .freq_ctl(fc), .rtd(rtd[f]));
    assign freq_ctl[f] = fc;
    lock_detector #(.E_W(16)) u_lock (
      .clk, .rst_n, .clr(f_start[f]), .e_valid(plt_v[f]), .energy(plt_e[f]),
      .threshold(lock_thr[f]), .locked(locked[f]), .irq(lock_irq[f]));
  end

  // ---------------- combiners
  logic signed [SYM_W+1:0] c0_re, c0_im, c1_re, c1_im;
  logic [2:0] c0_idx, c1_idx;
  logic c0_v, c1_v;
  deskew_combiner #(.NF(NF)) u_comb0 (
    .clk, .rst_n, .clr(|f_start), .enable(comb_en & running), .in_valid(sym0_v),
    .in_sym(sym0), .out_re(c0_re), .out_im(c0_im), .out_idx(c0_idx),
    .out_valid(c0_v), .forced(forced0), .late(late0));
  deskew_combiner #(.NF(NF)) u_comb1 (
    .clk, .rst_n, .clr(|f_start), .enable(comb_en & running), .in_valid(sym1_v),
    .in_sym(sym1), .out_re(c1_re), .out_im(c1_im), .out_idx(c1_idx),
    .out_valid(c1_v), .forced(forced1), .late(late1));

  // ---------------- DPRAM writer
  function automatic logic [7:0] sat8(input logic signed [SYM_W+1:0] v);
    return sat_sym(32'(v));
  endfunction

  logic [8:0]  wp0, wp1;
  logic        hold_v;
  logic [15:0] hold_w;
  logic        a_we;
  logic [9:0]  a_addr;
  logic [15:0] a_wdata;

  always_comb begin
    a_we = 1'b0; a_addr = '0; a_wdata = '0;
    if (c0_v) begin
      a_we = 1'b1; a_addr = {1'b0, wp0}; a_wdata = {sat8(c0_re), sat8(c0_im)};
    end else if (hold_v) begin
      a_we = 1'b1; a_addr = {1'b1, wp1}; a_wdata = hold_w;
    end else if (c1_v) begin
      a_we = 1'b1; a_addr = {1'b1, wp1}; a_wdata = {sat8(c1_re), sat8(c1_im)};
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wp0 <= '0; wp1 <= '0; hold_v <= 1'b0; hold_w <= '0;
    end else begin
      if (c0_v) wp0 <= wp0 + 1'b1;
      if (c0_v && c1_v) begin
        hold_v <= 1'b1; hold_w <= {sat8(c1_re), sat8(c1_im)};
      end else if (!c0_v && (hold_v || c1_v)) begin
        wp1 <= wp1 + 1'b1;
        if (hold_v && c1_v) hold_w <= {sat8(c1_re), sat8(c1_im)};
        else                hold_v <= 1'b0;
      end
    end
  assign wr_ptr0 = 16'(wp0);
  assign wr_ptr1 = 16'(wp1);

  dpram #(.AW(10), .DW(16)) u_dpram (
    .clk, .a_we, .a_addr, .a_wdata, .b_addr(dp_addr), .b_rdata(dp_rdata));

  // ---------------- power control
  power_control #(.NF(NF), .FRAC(4), .SP_W(12)) u_pc (
    .clk, .rst_n, .pcg, .frame, .enable(comb_en & running), .p_valid(plt_v),
    .p_re(plt_re), .p_im(plt_im), .sp_valid, .setpoint, .pc_bit, .pc_valid,
    .active_setpoint(active_sp));
endmodule
