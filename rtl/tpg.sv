// tpg: low-power 4-bit test pattern generator built on three flip-flops.
//
// Three D flip-flops W1 -> W2 -> W3 form a shift register. The first
// flip-flop loads en XOR W3, so with en high the register walks through six
// states (000, 100, 110, 111, 011, 001 for W1 W2 W3) and repeats. The four
// outputs are T3 = W3, T2 = W2, T1 = W1 and T0 = XOR of two state bits chosen
// by T0_TAP. With the default tap (W1 ^ W2) the sequence after reset is
//   0000, 0011, 0110, 1110, 1101, 1000, then 0000 again,
// one pattern per rising clock edge: three registers give four output bits.
// With T0_TAP = T0_W2_W3 the same register gives 0, 2, 7, 14, 12, 9.
//
// Interface: clock, active-high reset, en; t is T3..T0 straight from the
// registers and the one XOR gate (no output register).
//
// Timing: reset forces all three flip-flops to 0 (output 0000) at once,
// without waiting for a clock edge. With en low the first flip-flop reloads
// W3, so from the reset state the output stays 0000; if en drops in the
// middle of the sequence the three bits keep rotating instead (state 111
// holds).
//
// The flip-flop chain, the en XOR feedback and the W1 ^ W2 tap follow the
// design's logic diagram, and the sequence matches its pattern flow diagram.
// The W2 ^ W3 tap, the asynchronous reset and its polarity are choices of
// this implementation.
module tpg
  import bist_pkg::*;
#(
  parameter t0_tap_e T0_TAP = T0_W1_W2
) (
  input  logic     clock,
  input  logic     reset,
  input  logic     en,
  output operand_t t
);
  logic w1, w2, w3;

  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      w1 <= 1'b0;
      w2 <= 1'b0;
      w3 <= 1'b0;
    end else begin
      w1 <= en ^ w3;
      w2 <= w1;
      w3 <= w2;
    end
  end

  always_comb begin
    t[3] = w3;
    t[2] = w2;
    t[1] = w1;
    t[0] = (T0_TAP == T0_W1_W2) ? (w1 ^ w2) : (w2 ^ w3);
  end
endmodule
