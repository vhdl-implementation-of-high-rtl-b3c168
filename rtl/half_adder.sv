// half_adder: one-bit half adder, sum = a XOR b, carry = a AND b.
//
// Purely combinational. It is the gate-level building block the design uses
// inside the 2x2 Vedic multiplier and, paired, inside each full adder.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
