// Long and short PN code generator.
//
// Produces the complex spreading code of one reverse-link user, one chip per
// 'adv' pulse. The short I and Q codes are 15-stage Galois-form LFSRs with the
// IS-95 characteristic polynomials
//   PI(x) = x^15+x^13+x^9+x^8+x^7+x^5+1
//   PQ(x) = x^15+x^12+x^11+x^10+x^6+x^5+x^4+x^3+1
// extended by one zero chip at the end of the period, so both repeat every
// 2^15 chips. The long code is the 42-stage IS-95 long-code LFSR; its output
// is the modulo-2 sum of the state bits selected by 'long_mask', which gives
// each mobile its own code offset. The I and Q spreading chips are the short
// codes xored with the long code. The published design names the generator and the
// use of short and long codes; the polynomials and the way the codes are
// combined are this design's choice (standard IS-95 / cdma2000 practice).
//
// 'load' returns all registers to the epoch state (chip index 0). 'chip_idx'
// counts chips within the short-PN period and is used to number symbols.
// Outputs are registered state: the chip for index n is visible while
// chip_idx == n, and changes on the clock edge where 'adv' is high.
module pn_gen
  import wcdma_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  logic                  adv,
  input  logic [LONG_LEN-1:0]   long_mask,
  output logic                  pn_i,
  output logic                  pn_q,
  output logic [CHIP_IDX_W-1:0] chip_idx
);
  // Tap positions (exponents below 15 / 42) of the feedback polynomials.
  localparam logic [14:0] TAPS_I = 15'b010_0011_1010_0001; // x^13,9,8,7,5,1(x^0)
  localparam logic [14:0] TAPS_Q = 15'b001_1100_0111_1001; // x^12,11,10,6,5,4,3,x^0
  // Long code: x^42+x^35+x^33+x^31+x^27+x^26+x^25+x^22+x^21+x^19+x^18+x^17+
  //            x^16+x^10+x^7+x^6+x^5+x^3+x^2+x+1
  localparam logic [41:0] TAPS_L = 42'h0A8_E6F0_4EF;
  localparam logic [14:0] SEED_S = 15'h4000;               // epoch state
  localparam logic [41:0] SEED_L = 42'h200_0000_0001;

  logic [14:0] si, sq;
  logic [41:0] sl;

  // Galois-form step: shift left, feed the output bit back into the taps.
  function automatic logic [14:0] step15(input logic [14:0] s, input logic [14:0] taps);
    return s[14] ? ({s[13:0], 1'b0} ^ taps) : {s[13:0], 1'b0};
  endfunction

  // 2^15-1 chips of the m-sequence, then one inserted zero chip at the last
  // index of the period, after which the registers restart from the seed.
  logic        hold;
  assign hold = (chip_idx == CHIP_IDX_W'(2**CHIP_IDX_W - 1));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      si <= SEED_S;
      sq <= SEED_S;
      sl <= SEED_L;
      chip_idx <= '0;
    end else if (load) begin
      si <= SEED_S;
      sq <= SEED_S;
      sl <= SEED_L;
      chip_idx <= '0;
    end else if (adv) begin
      chip_idx <= chip_idx + 1'b1;
      sl <= sl[41] ? ({sl[40:0], 1'b0} ^ TAPS_L) : {sl[40:0], 1'b0};
      si <= hold ? SEED_S : step15(si, TAPS_I);
      sq <= hold ? SEED_S : step15(sq, TAPS_Q);
    end

  logic lc;
  assign lc   = ^(sl & long_mask);
  // The inserted chip (last index of the period) is a zero chip.
  assign pn_i = (hold ? 1'b0 : si[14]) ^ lc;
  assign pn_q = (hold ? 1'b0 : sq[14]) ^ lc;
endmodule
