// cut_multiplier_model: behavioural model of the external circuit under
// test, a 4x4 unsigned multiplier, for simulation only.
//
// It returns a * b, except that a fault can be injected: with fault_en high,
// product bit fault_bit is stuck at fault_val. This is how a testbench makes
// a defective circuit under test appear.
module cut_multiplier_model
  import bist_pkg::*;
(
  input  operand_t    a,
  input  operand_t    b,
  input  logic        fault_en,
  input  logic [2:0]  fault_bit,
  input  logic        fault_val,
  output product_t    product
);
  always_comb begin
    product = product_t'(a) * product_t'(b);
    if (fault_en) product[fault_bit] = fault_val;
  end
endmodule
