// bist_pattern_gen: the two test pattern generators that feed the multiplier
// operands during self-test.
//
// TPG-1 taps T0 = W1 ^ W2 and produces 0, 3, 6, 14, 13, 8; TPG-2 taps
// T0 = W2 ^ W3 and produces 0, 2, 7, 14, 12, 9. Both share clock, reset and
// enable, so they step together: one operand pair per clock, period six,
// and the products of the pairs are 0, 6, 42, 196, 156, 72.
//
// The two-generator arrangement and the resulting operand and product
// streams follow the design's block diagram and reference simulation; how
// TPG-2 differs from TPG-1 (the T0 tap) is inferred from that simulation.
module bist_pattern_gen
  import bist_pkg::*;
(
  input  logic     clock,
  input  logic     reset,
  input  logic     enable,
  output operand_t tpg_a,
  output operand_t tpg_b
);
  tpg #(.T0_TAP(T0_W1_W2)) u_tpg1 (.clock(clock), .reset(reset), .en(enable), .t(tpg_a));
  tpg #(.T0_TAP(T0_W2_W3)) u_tpg2 (.clock(clock), .reset(reset), .en(enable), .t(tpg_b));
endmodule
