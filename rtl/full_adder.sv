// full_adder: one-bit full adder made of two half adders and an OR gate.
//
// The first half adder adds a and b; the second adds the carry in to that
// partial sum; either half adder's carry gives the carry out. Purely
// combinational. The design calls for gate-level half and full adders; this
// particular two-half-adder arrangement is the usual textbook one.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic s1, c1, c2;

  half_adder u_ha0 (.a(a),  .b(b),  .s(s1), .c(c1));
  half_adder u_ha1 (.a(s1), .b(ci), .s(s),  .c(c2));

  assign co = c1 | c2;
endmodule
