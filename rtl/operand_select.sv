// operand_select: chooses the multiplier operands, user data or test
// patterns, with AND/OR gating.
//
// sel drives a 2:1 multiplexer whose data inputs are the constants 1 and 0;
// its output, copied to all four bits, is the selection vector. Each operand
// bit is then (selection AND user bit) OR (NOT selection AND test bit): an
// and2, an and2b1 (AND with one inverted input) and an or2 per bit, as in the
// design's schematic. sel = 1 passes the user operands, sel = 0 the test
// patterns. Purely combinational.
//
// Which user input pairs with which generator is this implementation's
// choice: user operand A with TPG-1, user operand B with TPG-2.
module operand_select
  import bist_pkg::*;
(
  input  logic     sel,
  input  operand_t user_a,
  input  operand_t user_b,
  input  operand_t tpg_a,
  input  operand_t tpg_b,
  output operand_t a,
  output operand_t b
);
  operand_t selection;

  // 2:1 mux of the constants 1 and 0, replicated across the operand width.
  always_comb begin
    for (int i = 0; i < OPW; i++) selection[i] = sel ? 1'b1 : 1'b0;
  end

  // and2 / and2b1 / or2 per bit.
  assign a = (selection & user_a) | (~selection & tpg_a);
  assign b = (selection & user_b) | (~selection & tpg_b);
endmodule
