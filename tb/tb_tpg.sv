// tb_tpg: the test pattern generator with both T0 taps.
//
// Checks, against sequences written out here: reset gives 0000; with enable
// high the default tap steps 0000, 0011, 0110, 1110, 1101, 1000 and the
// W2^W3 tap steps 0, 2, 7, 14, 12, 9, one pattern per clock, returning to the
// start after exactly six clocks; with enable low after reset the output
// holds 0000; with enable dropped mid-sequence the register rotates; reset
// clears the generator without a clock edge.
module tb_tpg;
  import bist_pkg::*;
  logic     clock = 1'b0;
  logic     reset, en;
  operand_t t1, t2;
  int checks = 0, failures = 0;

  localparam operand_t SEQ1[6] = '{4'b0000, 4'b0011, 4'b0110, 4'b1110, 4'b1101, 4'b1000};
  localparam operand_t SEQ2[6] = '{4'd0, 4'd2, 4'd7, 4'd14, 4'd12, 4'd9};

  tpg                      dut1 (.clock(clock), .reset(reset), .en(en), .t(t1));
  tpg #(.T0_TAP(T0_W2_W3)) dut2 (.clock(clock), .reset(reset), .en(en), .t(t2));

  always #5 clock = ~clock;

  initial begin
    repeat (500) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(operand_t e1, operand_t e2, string what);
    checks++;
    if (t1 !== e1 || t2 !== e2) begin
      failures++;
      $display("FAIL %s: got %b/%b want %b/%b", what, t1, t2, e1, e2);
    end
  endtask

  initial begin
    int first_wrap;
    reset = 1'b1; en = 1'b0;
    repeat (2) @(posedge clock);
    #1 expect_out(4'b0000, 4'b0000, "in reset");
    reset = 1'b0;
    // Enable low from reset: output stays 0000.
    repeat (4) begin
      @(posedge clock); #1 expect_out(4'b0000, 4'b0000, "enable low");
    end
    // Enable high: three full periods.
    en = 1'b1;
    first_wrap = -1;
    for (int k = 1; k <= 18; k++) begin
      @(posedge clock); #1
      expect_out(SEQ1[k % 6], SEQ2[k % 6], $sformatf("step %0d", k));
      if (first_wrap < 0 && t1 == 4'b0000) first_wrap = k;
    end
    // Period: back to 0000 after exactly six clocks.
    checks++;
    if (first_wrap != 6) begin
      failures++;
      $display("FAIL period: returned to 0000 after %0d clocks, want 6", first_wrap);
    end
    // Advance to state 2 (W1 W2 W3 = 110 -> 0110 / 0111), then drop enable:
    // the state rotates 110 -> 011 -> 101 -> 110.
    repeat (2) @(posedge clock);
    #1 expect_out(4'b0110, 4'd7, "before enable drop");
    en = 1'b0;
    @(posedge clock); #1 expect_out(4'b1101, 4'b1100, "rotate 1");   // W=011
    @(posedge clock); #1 expect_out(4'b1011, 4'b1011, "rotate 2");   // W=101
    @(posedge clock); #1 expect_out(4'b0110, 4'b0111, "rotate 3");   // W=110
    // Asynchronous reset between clock edges.
    #2 reset = 1'b1;
    #1 expect_out(4'b0000, 4'b0000, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
