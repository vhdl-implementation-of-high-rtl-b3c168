// tb_rca_adder: exhaustive check of the ripple-carry adder at its default
// 4-bit width and at the 6-bit width the 4x4 multiplier uses.
module tb_rca_adder;
  logic [3:0] x4, y4, s4;
  logic       co4;
  logic [5:0] x6, y6, s6;
  logic       co6;
  int checks = 0, failures = 0;

  rca_adder          dut4 (.x(x4), .y(y4), .s(s4), .co(co4));
  rca_adder #(.W(6)) dut6 (.x(x6), .y(y6), .s(s6), .co(co6));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        x4 = 4'(i); y4 = 4'(j);
        #1;
        checks++;
        if ({co4, s4} !== 5'(i + j)) begin
          failures++;
          $display("FAIL W=4 %0d+%0d got %0d", i, j, {co4, s4});
        end
      end
    end
    for (int i = 0; i < 64; i++) begin
      for (int j = 0; j < 64; j++) begin
        x6 = 6'(i); y6 = 6'(j);
        #1;
        checks++;
        if ({co6, s6} !== 7'(i + j)) begin
          failures++;
          if (failures < 10) $display("FAIL W=6 %0d+%0d got %0d", i, j, {co6, s6});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
