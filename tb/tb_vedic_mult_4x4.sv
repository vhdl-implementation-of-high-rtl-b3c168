// tb_vedic_mult_4x4: the 4x4 Vedic multiplier, first on the five operand
// pairs of the reference waveform (10*5=50, 3*5=15, 3*12=36, 11*12=132,
// 11*13=143, products written out here), then on all 256 operand pairs
// against the integer product.
module tb_vedic_mult_4x4;
  import bist_pkg::*;
  operand_t a, b;
  product_t q;
  int checks = 0, failures = 0;

  localparam int REF_A[5] = '{10, 3, 3, 11, 11};
  localparam int REF_B[5] = '{5, 5, 12, 12, 13};
  localparam int REF_Q[5] = '{50, 15, 36, 132, 143};

  vedic_mult_4x4 dut (.a(a), .b(b), .q(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 5; k++) begin
      a = operand_t'(REF_A[k]); b = operand_t'(REF_B[k]);
      #1;
      checks++;
      if (q !== product_t'(REF_Q[k])) begin
        failures++;
        $display("FAIL reference %0d*%0d got %0d want %0d", REF_A[k], REF_B[k], q, REF_Q[k]);
      end
    end
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = operand_t'(i); b = operand_t'(j);
        #1;
        checks++;
        if (q !== product_t'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d got %0d", i, j, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
