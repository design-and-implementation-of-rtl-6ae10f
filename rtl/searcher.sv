// Code acquisition module (searcher).
//
// Brings the local PN code to within half a chip of a received path by a
// serial search over a window of code phases, eight phases at a time per
// antenna group. Two data mappers pick the antenna/sector inputs of group 0
// and group 1. The received samples are decimated to two per chip and kept in
// an 8-stage half-chip delay line per group; correlator j of a group
// correlates the local code with the sample j half chips old, so the eight
// correlators of a group test eight consecutive half-chip offsets in one
// dwell of DWELL_CHIPS chips. After each dwell the 16 energies go, one per
// clock, to the group's sorter, which keeps the four best offsets; meanwhile
// the PN generator is held for eight half-chip ticks, which slews the local
// code by eight half chips for the next dwell. When the window (in half
// chips) is covered the searcher raises 'irq'.
//
// Offset convention: offsets count half chips of delay of the received code
// relative to the PN epoch strobe at which the search started. A result 'o'
// means that chip 0 of the path starts 4*o - 30 samples (+-2, the search resolution)  after the
// epoch (the constant is the pipeline delay of mapper, delay line and PN
// generator); a finger started with cfg.offset = 4*o - 36 then has its
// on-time sample in the middle of the chip.
//
// DSP interface (synchronous; read data one clock after cs && !we):
//   0x00 W bit0 = start search (at the next 'epoch'); R {irq, busy}
//   0x01 RW sel0[2:0], sel1[6:4]     input select per group
//   0x02 RW window length, half chips (a multiple of 8)
//   0x03..0x05 RW long-code mask [15:0], [31:16], [41:32]
//   0x06 W any value clears irq
//   0x10 + 16*g + 4*k + {0,1,2}      group g, rank k: offset, energy[15:0],
//                                    energy[27:16]
// 16 correlators in two groups of eight, the shared long and short PN
// generator, the sorting of four offsets with their energies, serial search
// and the DSP interface with interrupt follow the published design
// (integration length 128 chips as in its measurements). The delay-line
// arrangement, the slewing, the register map and the widths are this
// design's choice.
module searcher
  import wcdma_pkg::*;
#(
  parameter int unsigned NUM_CORR    = 16,
  parameter int unsigned DWELL_CHIPS = 128
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NUM_RX-1:0][ADC_W-1:0]  adc_i,
  input  logic [NUM_RX-1:0][ADC_W-1:0]  adc_q,
  input  logic                          epoch,
  input  logic                          cs,
  input  logic                          we,
  input  logic [7:0]                    addr,
  input  logic [15:0]                   wdata,
  output logic [15:0]                   rdata,
  output logic                          irq
);
  localparam int unsigned NPG   = NUM_CORR / 2;        // correlators per group
  localparam int unsigned ACC_W = SMP_W + 2 + $clog2(DWELL_CHIPS);
  localparam int unsigned E_W   = 2 * ACC_W;
  localparam int unsigned HALF  = OSR / 2;             // clocks per half chip

  // ---------------- registers
  logic [2:0]  sel0, sel1;
  logic [15:0] win;
  logic [LONG_LEN-1:0] long_mask;
  logic start;

  // ---------------- data mapping and half-chip delay lines
  logic signed [SMP_W-1:0] x0_i, x0_q, x1_i, x1_q;
  data_mapper u_map0 (.clk, .rst_n, .sel(sel0), .adc_i, .adc_q, .out_i(x0_i), .out_q(x0_q));
  data_mapper u_map1 (.clk, .rst_n, .sel(sel1), .adc_i, .adc_q, .out_i(x1_i), .out_q(x1_q));

  logic signed [SMP_W-1:0] dl0_i [NPG], dl0_q [NPG], dl1_i [NPG], dl1_q [NPG];

  // ---------------- control
  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_DWELL, S_SLEW} state_t;
  state_t state;
  logic [$clog2(HALF)-1:0]        hc;          // clock within half chip
  logic                           ph;          // half-chip phase within chip
  logic [$clog2(DWELL_CHIPS)-1:0] ccnt;
  logic [$clog2(NPG+1)-1:0]       scnt;        // slew half ticks left
  logic [15:0]                    base;        // offset of correlator NPG-1
  logic                           first, dump, busy;
  logic [$clog2(NPG+1)-1:0]       sort_k;      // next energy to sort
  logic [15:0]                    sort_base;
  logic                           sort_run;

  logic htick, ctick;
  assign htick = (state == S_DWELL || state == S_SLEW) && hc == $bits(hc)'(HALF - 1);
  assign ctick = htick && state == S_DWELL && ph;

  logic pn_i, pn_q;
  logic [CHIP_IDX_W-1:0] pn_idx;
  pn_gen u_pn (.clk, .rst_n, .load(state == S_WAIT && epoch), .adv(ctick),
               .long_mask, .pn_i, .pn_q, .chip_idx(pn_idx));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int j = 0; j < NPG; j++) begin
        dl0_i[j] <= '0; dl0_q[j] <= '0; dl1_i[j] <= '0; dl1_q[j] <= '0;
      end
    end else if (htick) begin
      dl0_i[0] <= x0_i; dl0_q[0] <= x0_q; dl1_i[0] <= x1_i; dl1_q[0] <= x1_q;
      for (int j = 1; j < NPG; j++) begin
        dl0_i[j] <= dl0_i[j-1]; dl0_q[j] <= dl0_q[j-1];
        dl1_i[j] <= dl1_i[j-1]; dl1_q[j] <= dl1_q[j-1];
      end
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= S_IDLE; hc <= '0; ph <= 1'b0; ccnt <= '0; scnt <= '0;
      base <= '0; first <= 1'b0; dump <= 1'b0; busy <= 1'b0; irq <= 1'b0;
    end else begin
      dump <= 1'b0;
      if (cs && we && addr == 8'h06) irq <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin state <= S_WAIT; busy <= 1'b1; end
        S_WAIT: if (epoch) begin
                  state <= S_DWELL; hc <= '0; ph <= 1'b0; ccnt <= '0;
                  base <= '0; first <= 1'b1;
                end
        S_DWELL: begin
          hc <= (hc == $bits(hc)'(HALF - 1)) ? '0 : hc + 1'b1;
          if (htick) ph <= !ph;
          if (ctick) begin
            first <= 1'b0;
            if (ccnt == $bits(ccnt)'(DWELL_CHIPS - 1)) begin
              ccnt  <= '0;
              dump  <= 1'b1;
              state <= S_SLEW;
              scnt  <= $bits(scnt)'(NPG);
            end else
              ccnt <= ccnt + 1'b1;
          end
        end
        S_SLEW: begin
          hc <= (hc == $bits(hc)'(HALF - 1)) ? '0 : hc + 1'b1;
          if (htick) begin
            if (scnt == $bits(scnt)'(1)) begin
              if (base + 16'(NPG) >= win) begin
                state <= S_IDLE; busy <= 1'b0; irq <= 1'b1;
              end else begin
                state <= S_DWELL; first <= 1'b1;
              end
              base <= base + 16'(NPG);
            end
            scnt <= scnt - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end

  // ---------------- correlators
  logic [NUM_CORR-1:0][E_W-1:0] energy;
  logic [NUM_CORR-1:0]          e_valid;
  for (genvar j = 0; j < NPG; j++) begin : g_corr
    srch_correlator #(.ACC_W(ACC_W)) u_c0 (
      .clk, .rst_n, .en(ctick), .clr(first), .dump, .x_i(dl0_i[j]), .x_q(dl0_q[j]),
      .pn_i, .pn_q, .energy(energy[j]), .energy_valid(e_valid[j]));
    srch_correlator #(.ACC_W(ACC_W)) u_c1 (
      .clk, .rst_n, .en(ctick), .clr(first), .dump, .x_i(dl1_i[j]), .x_q(dl1_q[j]),
      .pn_i, .pn_q, .energy(energy[NPG+j]), .energy_valid(e_valid[NPG+j]));
  end

  // ---------------- sorting: one candidate per group per clock
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sort_k <= '0; sort_run <= 1'b0; sort_base <= '0;
    end else if (e_valid[0]) begin
      sort_k <= '0; sort_run <= 1'b1; sort_base <= base;
    end else if (sort_run) begin
      sort_k <= sort_k + 1'b1;
      if (sort_k == $bits(sort_k)'(NPG - 1)) sort_run <= 1'b0;
    end

  logic [$clog2(NPG)-1:0] sk;
  logic [15:0]            cand_off;
  assign sk       = sort_k[$clog2(NPG)-1:0];
  assign cand_off = sort_base + 16'(NPG - 1) - 16'(sk);

  logic [3:0][E_W-1:0] best_e0, best_e1;
  logic [3:0][15:0]    best_o0, best_o1;
  logic                sort_clr;
  assign sort_clr = (state == S_WAIT) && epoch;
  srch_sorter #(.NUM_BEST(4), .E_W(E_W), .OFF_W(16)) u_sort0 (
    .clk, .rst_n, .clr(sort_clr), .in_valid(sort_run), .in_energy(energy[sk]),
    .in_offset(cand_off), .best_energy(best_e0), .best_offset(best_o0));
  srch_sorter #(.NUM_BEST(4), .E_W(E_W), .OFF_W(16)) u_sort1 (
    .clk, .rst_n, .clr(sort_clr), .in_valid(sort_run), .in_energy(energy[NPG + 32'(sk)]),
    .in_offset(cand_off), .best_energy(best_e1), .best_offset(best_o1));

  // ---------------- DSP interface
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sel0 <= '0; sel1 <= 3'd3; win <= 16'd64; long_mask <= '0; start <= 1'b0;
      rdata <= '0;
    end else begin
      start <= cs && we && addr == 8'h00 && wdata[0];
      if (cs && we)
        unique case (addr)
          8'h01: begin sel0 <= wdata[2:0]; sel1 <= wdata[6:4]; end
          8'h02: win <= wdata;
          8'h03: long_mask[15:0]  <= wdata;
          8'h04: long_mask[31:16] <= wdata;
          8'h05: long_mask[41:32] <= wdata[9:0];
          default: ;
        endcase
      if (cs && !we) begin
        automatic logic [E_W-1:0] e;
        automatic logic [15:0]    o;
        e = addr[5] ? best_e1[addr[3:2]] : best_e0[addr[3:2]];
        o = addr[5] ? best_o1[addr[3:2]] : best_o0[addr[3:2]];
        unique casez (addr)
          8'h00: rdata <= {14'd0, irq, busy};
          8'h01: rdata <= {9'd0, sel1, 1'b0, sel0};
          8'h02: rdata <= win;
          8'h03: rdata <= long_mask[15:0];
          8'h04: rdata <= long_mask[31:16];
          8'h05: rdata <= {6'd0, long_mask[41:32]};
          8'b0001_??00, 8'b0010_??00: rdata <= o;
          8'b0001_??01, 8'b0010_??01: rdata <= e[15:0];
          8'b0001_??10, 8'b0010_??10: rdata <= 16'(e[E_W-1:16]);
          default: rdata <= '0;
        endcase
      end
    end
endmodule
