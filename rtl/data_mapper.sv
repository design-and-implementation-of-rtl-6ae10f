// Data mapper: selects one of the six received I/Q sample streams (two
// antennas times three sectors) and converts the 4-bit ADC code into a
// 2's complement sample in the range -15..15.
//
// The six-way selection and the -15..15 output range follow the published
// design. How the ADC code is read is this design's choice: the code is taken
// as offset binary and mapped to 2*code-15, which uses the full -15..15 range
// with odd values only. Input n is antenna n/3, sector n%3.
//
// Timing: the output is registered, one clock after the input; a new sample
// every clock (29.4912 MHz, eight samples per chip).
module data_mapper
  import wcdma_pkg::*;
#(
  parameter int unsigned NUM_INPUTS = NUM_RX,
  parameter int unsigned IN_W       = ADC_W
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [$clog2(NUM_INPUTS)-1:0]     sel,
  input  logic [NUM_INPUTS-1:0][IN_W-1:0]   adc_i,
  input  logic [NUM_INPUTS-1:0][IN_W-1:0]   adc_q,
  output logic signed [IN_W:0]              out_i,
  output logic signed [IN_W:0]              out_q
);
  localparam int signed OFFS = (1 << IN_W) - 1;

  function automatic logic signed [IN_W:0] map(input logic [IN_W-1:0] code);
    logic signed [IN_W+1:0] t;                    // 2*code - (2^IN_W - 1)
    t = signed'({1'b0, code, 1'b0}) - (IN_W+2)'(OFFS);
    return t[IN_W:0];
  endfunction

  logic [IN_W-1:0] ci, cq;
  always_comb begin
    ci = '0;
    cq = '0;
    if (int'(sel) < NUM_INPUTS) begin
      ci = adc_i[sel];
      cq = adc_q[sel];
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_i <= '0;
      out_q <= '0;
    end else begin
      out_i <= map(ci);
      out_q <= map(cq);
    end
endmodule
