// rca_adder: W-bit ripple-carry parallel adder, s + (co << W) = x + y.
//
// Bit 0 is a half adder (there is no carry in); bits 1..W-1 are full adders
// chained through their carries. Purely combinational; the delay grows with
// W. The default width of 4 is the "4-bit parallel adder" of the design; the
// 4x4 Vedic multiplier also instantiates a 6-bit version, because the partial
// products it adds are 6 bits wide once shifted into place.
module rca_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] s,
  output logic         co
);
  logic [W:0] c;

  assign c[0] = 1'b0;

  half_adder u_ha (.a(x[0]), .b(y[0]), .s(s[0]), .c(c[1]));

  for (genvar i = 1; i < W; i++) begin : g_fa
    full_adder u_fa (.a(x[i]), .b(y[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end

  assign co = c[W];
endmodule
