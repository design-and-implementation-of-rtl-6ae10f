// CPU interface of the code tracking and data demodulation module.
//
// Register file through which the controller (DSP) configures the four
// fingers and reads their state. Synchronous bus; read data one clock after
// cs && !we.
//   finger f, base 16*f:
//     +0  W bit0 start, bit1 stop          R {irq pending of f, running, locked}
//     +1  offset[15:0]   +2 offset[17:16]  (code phase in samples)
//     +3  {log2_sf0[11:8], walsh0[7:0]}    DCCH
//     +4  {log2_sf1[11:8], walsh1[7:0]}    FCH/SCH
//     +5  {track_en[12], sym_shift[11:8], log2_plt[3:0]}
//     +6..+8 long-code mask [15:0], [31:16], [41:32]
//     +9  lock threshold (pilot energy)
//     +10 R loop-filter output (NCO frequency offset)
//     +11 R round trip delay [15:0]   +12 R round trip delay [17:16] (samples)
//   0x40 RW combining / power-control enable mask [3:0]
//   0x41 R lock-change interrupt flags [3:0]; W clears the flags set in wdata
//   0x42 R DCCH symbol write pointer   0x43 R FCH/SCH symbol write pointer
//   0x44 R forced combines             0x45 R late symbols dropped
//   0x46 R power-control set point in use
// 'irq' is high while any lock-change flag is set. The published design shows a CPU
// interface with address, data and control lines and an interrupt from the
// lock detector; the register map is this design's choice.
module demod_cpu_if
  import wcdma_pkg::*;
#(
  parameter int unsigned NF = NUM_FINGERS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cs,
  input  logic                  we,
  input  logic [7:0]            addr,
  input  logic [15:0]           wdata,
  output logic [15:0]           rdata,
  output logic                  irq,
  output finger_cfg_t [NF-1:0]  cfg,
  output logic [NF-1:0]         start,
  output logic [NF-1:0]         stop,
  output logic [NF-1:0][15:0]   lock_thr,
  output logic [NF-1:0]         comb_en,
  input  logic [NF-1:0]         running,
  input  logic [NF-1:0]         locked,
  input  logic [NF-1:0]         lock_irq,
  input  logic [NF-1:0][11:0]   freq_ctl,
  input  logic [NF-1:0][17:0]   rtd,
  input  logic [15:0]           wr_ptr0,
  input  logic [15:0]           wr_ptr1,
  input  logic                  forced,
  input  logic                  late,
  input  logic [15:0]           setpoint
);
  logic [NF-1:0] flags;
  logic [15:0]   n_forced, n_late;
  logic [1:0]    fsel;
  logic          fsel_ok;
  assign fsel    = addr[5:4];
  assign fsel_ok = !addr[7] && !addr[6] && (32'(fsel) < NF);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cfg <= '0; start <= '0; stop <= '0; lock_thr <= '0; comb_en <= '0;
      flags <= '0; n_forced <= '0; n_late <= '0; rdata <= '0;
    end else begin
      start <= '0;
      stop  <= '0;
      flags <= flags | lock_irq;
      if (forced) n_forced <= n_forced + 1'b1;
      if (late)   n_late   <= n_late + 1'b1;
      if (cs && we) begin
        if (fsel_ok)
          unique case (addr[3:0])
            4'd0: begin start[fsel] <= wdata[0]; stop[fsel] <= wdata[1]; end
            4'd1: cfg[fsel].offset[15:0] <= wdata;
            4'd2: cfg[fsel].offset[17:16] <= wdata[1:0];
            4'd3: begin cfg[fsel].walsh0 <= wdata[7:0]; cfg[fsel].log2_sf0 <= wdata[11:8]; end
            4'd4: begin cfg[fsel].walsh1 <= wdata[7:0]; cfg[fsel].log2_sf1 <= wdata[11:8]; end
            4'd5: begin
                    cfg[fsel].log2_plt  <= wdata[3:0];
                    cfg[fsel].sym_shift <= wdata[11:8];
                    cfg[fsel].track_en  <= wdata[12];
                  end
            4'd6: cfg[fsel].long_mask[15:0]  <= wdata;
            4'd7: cfg[fsel].long_mask[31:16] <= wdata;
            4'd8: cfg[fsel].long_mask[41:32] <= wdata[9:0];
            4'd9: lock_thr[fsel] <= wdata;
            default: ;
          endcase
        else if (addr == 8'h40) comb_en <= wdata[NF-1:0];
        else if (addr == 8'h41) flags <= (flags & ~wdata[NF-1:0]) | lock_irq;
      end
      if (cs && !we) begin
        rdata <= '0;
        if (fsel_ok)
          unique case (addr[3:0])
            4'd0: rdata <= {13'd0, flags[fsel], running[fsel], locked[fsel]};
            4'd1: rdata <= cfg[fsel].offset[15:0];
            4'd2: rdata <= {14'd0, cfg[fsel].offset[17:16]};
            4'd3: rdata <= {4'd0, cfg[fsel].log2_sf0, cfg[fsel].walsh0};
            4'd4: rdata <= {4'd0, cfg[fsel].log2_sf1, cfg[fsel].walsh1};
            4'd5: rdata <= {3'd0, cfg[fsel].track_en, cfg[fsel].sym_shift, 4'd0, cfg[fsel].log2_plt};
            4'd6: rdata <= cfg[fsel].long_mask[15:0];
            4'd7: rdata <= cfg[fsel].long_mask[31:16];
            4'd8: rdata <= {6'd0, cfg[fsel].long_mask[41:32]};
            4'd9: rdata <= lock_thr[fsel];
            4'd10: rdata <= 16'(signed'(freq_ctl[fsel]));
            4'd11: rdata <= rtd[fsel][15:0];
            4'd12: rdata <= {14'd0, rtd[fsel][17:16]};
            default: ;
          endcase
        else
          unique case (addr)
            8'h40: rdata <= 16'(comb_en);
            8'h41: rdata <= 16'(flags);
            8'h42: rdata <= wr_ptr0;
            8'h43: rdata <= wr_ptr1;
            8'h44: rdata <= n_forced;
            8'h45: rdata <= n_late;
            8'h46: rdata <= setpoint;
            default: ;
          endcase
      end
    end

  assign irq = |flags;
endmodule
