// Search result sorter: keeps the NUM_BEST largest dwell energies with their
// PN offsets, largest first.
//
// Each 'in_valid' candidate is inserted in one clock: entries with a smaller
// energy move one place down and the smallest falls off. A candidate equal to
// a stored energy goes below it, so the earlier offset wins a tie. 'clr'
// empties the list (energy 0). Keeping four offsets and energies in energy
// order follows the published design; the insertion structure is this
// design's choice.
module srch_sorter #(
  parameter int unsigned NUM_BEST = 4,
  parameter int unsigned E_W      = 28,
  parameter int unsigned OFF_W    = 16
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              clr,
  input  logic                              in_valid,
  input  logic [E_W-1:0]                    in_energy,
  input  logic [OFF_W-1:0]                  in_offset,
  output logic [NUM_BEST-1:0][E_W-1:0]      best_energy,
  output logic [NUM_BEST-1:0][OFF_W-1:0]    best_offset
);
  logic [NUM_BEST-1:0] gt;   // candidate beats entry k
  always_comb
    for (int k = 0; k < NUM_BEST; k++)
      gt[k] = in_energy > best_energy[k];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      best_energy <= '0;
      best_offset <= '0;
    end else if (clr) begin
      best_energy <= '0;
      best_offset <= '0;
    end else if (in_valid) begin
      for (int k = 0; k < NUM_BEST; k++) begin
        automatic int km1 = (k == 0) ? 0 : k - 1;
        if (gt[k]) begin
          if (k == 0 || !gt[km1]) begin
            best_energy[k] <= in_energy;        // candidate lands here
            best_offset[k] <= in_offset;
          end else begin
            best_energy[k] <= best_energy[km1]; // entry above moves down
            best_offset[k] <= best_offset[km1];
          end
        end
      end
    end
endmodule
