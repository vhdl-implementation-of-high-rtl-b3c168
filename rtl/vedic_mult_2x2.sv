// vedic_mult_2x2: 2x2-bit unsigned multiplier, q = a * b, at gate level.
//
// Urdhva-Tiryagbhyam ("vertically and crosswise"): the vertical product
// a0&b0 is q0; the two crosswise products a1&b0 and a0&b1 go through a half
// adder to give q1 and a carry; that carry and the vertical product a1&b1 go
// through a second half adder to give q2 and q3. Four AND gates and two half
// adders, purely combinational; the gate network is the one the design
// draws for this block.
module vedic_mult_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q
);
  logic p_a1b0, p_a0b1, p_a1b1, c1;

  assign q[0]   = a[0] & b[0];
  assign p_a1b0 = a[1] & b[0];
  assign p_a0b1 = a[0] & b[1];
  assign p_a1b1 = a[1] & b[1];

  half_adder u_ha0 (.a(p_a1b0), .b(p_a0b1), .s(q[1]), .c(c1));
  half_adder u_ha1 (.a(c1),     .b(p_a1b1), .s(q[2]), .c(q[3]));
endmodule
