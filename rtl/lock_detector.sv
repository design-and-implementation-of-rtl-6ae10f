// Finger lock detector.
//
// Compares each pilot energy estimate ('e_valid', 'energy') with 'threshold'.
// LOCK_CNT consecutive estimates above it declare the finger locked;
// UNLOCK_CNT consecutive estimates below it declare it unlocked. Every change
// of 'locked' raises 'irq' for one clock, the interrupt to the controller.
// The published design only names a lock detector with an interrupt output; the
// energy comparison, the counts and the hysteresis are this design's choice.
module lock_detector #(
  parameter int unsigned E_W        = 28,
  parameter int unsigned LOCK_CNT   = 4,
  parameter int unsigned UNLOCK_CNT = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clr,
  input  logic           e_valid,
  input  logic [E_W-1:0] energy,
  input  logic [E_W-1:0] threshold,
  output logic           locked,
  output logic           irq
);
  localparam int unsigned CW = $clog2((LOCK_CNT > UNLOCK_CNT ? LOCK_CNT : UNLOCK_CNT) + 1);
  logic [CW-1:0] cnt;   // consecutive estimates that disagree with 'locked'

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt <= '0; locked <= 1'b0; irq <= 1'b0;
    end else if (clr) begin
      cnt <= '0; irq <= locked; locked <= 1'b0;
    end else begin
      irq <= 1'b0;
      if (e_valid) begin
        if ((energy > threshold) == locked)
          cnt <= '0;
        else if (cnt == CW'((locked ? UNLOCK_CNT : LOCK_CNT) - 1)) begin
          cnt    <= '0;
          locked <= !locked;
          irq    <= 1'b1;
        end else
          cnt <= cnt + 1'b1;
      end
    end
endmodule
