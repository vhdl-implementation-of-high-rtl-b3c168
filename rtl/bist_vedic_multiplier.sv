// bist_vedic_multiplier: a 4x4 Vedic multiplier wrapped in built-in
// self-test logic that checks an external multiplier against it.
//
// sel picks the operands: sel = 1 takes the user's multiplier and
// multiplicand, sel = 0 takes the two test pattern generators, which step
// through six operand pairs per period while enable is high. The chosen pair
// goes to the Vedic multiplier (product) and, through cut_a and cut_b, to
// the circuit under test, which sits outside this module and returns its
// result on cut_product. cut_result is 1 when the two products agree (the
// circuit under test passes) and 0 otherwise.
//
// Timing: the only state is the six flip-flops of the two generators
// (clock, active-high asynchronous reset). Everything from the operands to
// product and cut_result is combinational, so in self-test mode a new
// operand pair, product and verdict appear after each rising clock edge,
// once the external circuit has answered within the same cycle.
//
// The block structure (generators, selection multiplexers, Vedic
// multiplier, comparator) follows the design; keeping the circuit under
// test outside, with its operands brought out as ports, follows the
// design's block diagram, where it is marked as an external circuit.
module bist_vedic_multiplier
  import bist_pkg::*;
(
  input  logic     clock,
  input  logic     reset,
  input  logic     enable,
  input  logic     sel,
  input  operand_t multiplier,
  input  operand_t multiplicand,
  output operand_t cut_a,
  output operand_t cut_b,
  input  product_t cut_product,
  output product_t product,
  output logic     cut_result
);
  operand_t tpg_a, tpg_b;

  bist_pattern_gen u_bist_pattern_gen (
    .clock (clock),
    .reset (reset),
    .enable(enable),
    .tpg_a (tpg_a),
    .tpg_b (tpg_b)
  );

  operand_select u_operand_select (
    .sel   (sel),
    .user_a(multiplier),
    .user_b(multiplicand),
    .tpg_a (tpg_a),
    .tpg_b (tpg_b),
    .a     (cut_a),
    .b     (cut_b)
  );

  vedic_mult_4x4 u_vedic (
    .a(cut_a),
    .b(cut_b),
    .q(product)
  );

  product_compare u_compare (
    .a(product),
    .b(cut_product),
    .c(cut_result)
  );
endmodule
