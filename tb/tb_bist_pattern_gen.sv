// tb_bist_pattern_gen: the two generators together must give the operand
// pairs (0,0) (3,2) (6,7) (14,14) (13,12) (8,9), whose products are
// 0, 6, 42, 196, 156, 72, repeating every six clocks.
module tb_bist_pattern_gen;
  import bist_pkg::*;
  logic     clock = 1'b0;
  logic     reset, enable;
  operand_t tpg_a, tpg_b;
  int checks = 0, failures = 0;

  localparam int A[6]    = '{0, 3, 6, 14, 13, 8};
  localparam int B[6]    = '{0, 2, 7, 14, 12, 9};
  localparam int PROD[6] = '{0, 6, 42, 196, 156, 72};

  bist_pattern_gen dut (.clock(clock), .reset(reset), .enable(enable), .tpg_a(tpg_a), .tpg_b(tpg_b));

  always #5 clock = ~clock;

  initial begin
    repeat (200) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; enable = 1'b1;
    repeat (2) @(posedge clock);
    #1 reset = 1'b0;
    for (int k = 0; k < 24; k++) begin
      checks++;
      if (tpg_a !== operand_t'(A[k % 6]) || tpg_b !== operand_t'(B[k % 6]) ||
          int'(tpg_a) * int'(tpg_b) != PROD[k % 6]) begin
        failures++;
        $display("FAIL step %0d: got (%0d,%0d) want (%0d,%0d)", k, tpg_a, tpg_b, A[k % 6], B[k % 6]);
      end
      @(posedge clock); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
