// vedic_mult_4x4: 4x4-bit unsigned multiplier, q = a * b, from four 2x2
// Vedic blocks and three ripple-carry adders.
//
// The operands are split into halves. The four 2x2 blocks form
//   q3 = a[3:2]*b[3:2], q2 = a[1:0]*b[3:2], q1 = a[3:2]*b[1:0], q0 = a[1:0]*b[1:0].
// Bits q[1:0] are q0[1:0] directly. A 6-bit adder sums {q3,00} and {00,q2};
// a 4-bit adder sums q1 and {00,q0[3:2]}; a final 6-bit adder sums those two
// results to give q[7:2]. No adder can overflow for 4-bit operands, so the
// carry outs are unused. Purely combinational.
//
// The split, the partial products and the adder arrangement follow the
// design's architecture drawing; the 6-bit width of the first and last adder
// is this implementation's reading of that drawing's bus labels.
module vedic_mult_4x4
  import bist_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  output product_t q
);
  logic [3:0] q0, q1, q2, q3;
  logic [5:0] sum_hi, sum_out;
  logic [3:0] sum_lo;
  logic       co_hi, co_lo, co_out;

  vedic_mult_2x2 u_m3 (.a(a[3:2]), .b(b[3:2]), .q(q3));
  vedic_mult_2x2 u_m2 (.a(a[1:0]), .b(b[3:2]), .q(q2));
  vedic_mult_2x2 u_m1 (.a(a[3:2]), .b(b[1:0]), .q(q1));
  vedic_mult_2x2 u_m0 (.a(a[1:0]), .b(b[1:0]), .q(q0));

  rca_adder #(.W(6)) u_add_hi (
    .x({q3, 2'b00}), .y({2'b00, q2}), .s(sum_hi), .co(co_hi)
  );
  rca_adder #(.W(4)) u_add_lo (
    .x(q1), .y({2'b00, q0[3:2]}), .s(sum_lo), .co(co_lo)
  );
  rca_adder #(.W(6)) u_add_out (
    .x(sum_hi), .y({2'b00, sum_lo}), .s(sum_out), .co(co_out)
  );

  assign q = {sum_out, q0[1:0]};

  // For 4-bit operands the partial sums stay in range: 225 is the largest product.
  always_comb begin
    assert (!(co_hi || co_lo || co_out))
      else $error("vedic_mult_4x4: unexpected adder carry out");
  end
endmodule
