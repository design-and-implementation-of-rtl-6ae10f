// Data selector and timing generator of the channel card.
//
// Data selector: passes either the received samples or the loop-back
// samples (from the loop-back connector) to the demodulator and searchers.
//
// Timing generator: from the 29.4912 MHz system clock (OSR = 8 clocks per
// chip) it derives
//   chip     one clock per chip,
//   pcg      one clock per power control group (PCG_CHIPS chips, 1.25 ms),
//   frame    one clock per frame (FRAME_CHIPS chips, 20 ms),
//   epoch    one clock per short-PN period (2^15 chips).
// A 20 ms reference pulse ('ref_20ms') restarts the chip, group and frame
// counters; the two-second reference ('ref_2s', the even-second pulse)
// restarts all counters including the PN epoch, since two seconds hold a
// whole number of PN periods and frames. 'resync' pulses when a reference
// pulse found a counter out of step. The inputs (received data, loop-back
// connector, system clock, 20 ms and 2 pps references) are those of the
// published block diagram; the counter structure is this design's choice.
//
// Timing: all strobes are registered. A reference pulse in clock t makes the
// next clock count zero; the strobes of count zero come at t+1.
module timing_gen
  import wcdma_pkg::*;
#(
  parameter int unsigned PCG_LEN   = PCG_CHIPS,
  parameter int unsigned FRAME_LEN = FRAME_CHIPS,
  parameter int unsigned EPOCH_LEN = 2**SHORT_LEN
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          loopback,
  input  logic [NUM_RX-1:0][ADC_W-1:0]  rx_i,
  input  logic [NUM_RX-1:0][ADC_W-1:0]  rx_q,
  input  logic [NUM_RX-1:0][ADC_W-1:0]  lb_i,
  input  logic [NUM_RX-1:0][ADC_W-1:0]  lb_q,
  input  logic                          ref_20ms,
  input  logic                          ref_2s,
  output logic [NUM_RX-1:0][ADC_W-1:0]  data_i,
  output logic [NUM_RX-1:0][ADC_W-1:0]  data_q,
  output logic                          chip,
  output logic                          pcg,
  output logic                          frame,
  output logic                          epoch,
  output logic                          resync
);
  logic [$clog2(OSR)-1:0]       smp;
  logic [$clog2(FRAME_LEN)-1:0] fchip;
  logic [$clog2(PCG_LEN)-1:0]   pchip;
  logic [$clog2(EPOCH_LEN)-1:0] echip;

  logic chip_end;
  assign chip_end = (smp == $bits(smp)'(OSR - 1));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      data_i <= '0;
      data_q <= '0;
    end else begin
      data_i <= loopback ? lb_i : rx_i;
      data_q <= loopback ? lb_q : rx_q;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      smp <= '0; fchip <= '0; pchip <= '0; echip <= '0;
      chip <= 1'b0; pcg <= 1'b0; frame <= 1'b0; epoch <= 1'b0; resync <= 1'b0;
    end else begin
      resync <= 1'b0;
      if (ref_20ms || ref_2s) begin
        smp <= '0; fchip <= '0; pchip <= '0;
        if (ref_2s) echip <= '0;
        chip <= 1'b1; pcg <= 1'b1; frame <= 1'b1;
        epoch <= ref_2s;
        resync <= (smp != '0) || (fchip != '0) || (ref_2s && echip != '0);
      end else begin
        smp   <= chip_end ? '0 : smp + 1'b1;
        chip  <= chip_end;
        pcg   <= 1'b0;
        frame <= 1'b0;
        epoch <= 1'b0;
        if (chip_end) begin
          fchip <= (fchip == $bits(fchip)'(FRAME_LEN - 1)) ? '0 : fchip + 1'b1;
          pchip <= (pchip == $bits(pchip)'(PCG_LEN - 1))   ? '0 : pchip + 1'b1;
          echip <= (echip == $bits(echip)'(EPOCH_LEN - 1)) ? '0 : echip + 1'b1;
          pcg   <= (pchip == $bits(pchip)'(PCG_LEN - 1));
          frame <= (fchip == $bits(fchip)'(FRAME_LEN - 1));
          epoch <= (echip == $bits(echip)'(EPOCH_LEN - 1));
        end
      end
    end
endmodule
