// product_compare: the response analyser of the self-test.
//
// c is 1 when the two products are equal (the circuit under test passes)
// and 0 when any bit differs (the circuit under test is defective). It is
// combinational, so c follows the operands in the same cycle. The design
// names the block and its pass/fail meaning; a bitwise equality compare is
// the simplest circuit that does it.
module product_compare
  import bist_pkg::*;
(
  input  product_t a,
  input  product_t b,
  output logic     c
);
  assign c = ~|(a ^ b);
endmodule
