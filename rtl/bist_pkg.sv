// bist_pkg: types and constants shared by the BIST Vedic multiplier.
//
// OPW is the operand width of the multiplier (4 bits) and PW the product
// width (8 bits); both are fixed by the design, which is a 4x4 multiplier
// under self-test. t0_tap_e picks which pair of state bits a test pattern
// generator XORs to form its lowest output bit T0: the first generator taps
// W1^W2 as drawn in its logic diagram, the second taps W2^W3, which is the
// choice that reproduces the second operand stream of the reference
// simulation (0, 2, 7, 14, 12, 9).
package bist_pkg;
  localparam int unsigned OPW = 4;
  localparam int unsigned PW  = 2 * OPW;

  typedef logic [OPW-1:0] operand_t;
  typedef logic [PW-1:0]  product_t;

  typedef enum logic {
    T0_W1_W2 = 1'b0,   // T0 = W1 ^ W2 (TPG-1)
    T0_W2_W3 = 1'b1    // T0 = W2 ^ W3 (TPG-2)
  } t0_tap_e;
endpackage
