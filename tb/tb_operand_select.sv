// tb_operand_select: random operands, both settings of sel; sel = 1 must
// pass the user operands and sel = 0 the test patterns.
module tb_operand_select;
  import bist_pkg::*;
  logic     sel;
  operand_t user_a, user_b, tpg_a, tpg_b, a, b;
  int checks = 0, failures = 0;

  operand_select dut (.sel(sel), .user_a(user_a), .user_b(user_b),
                      .tpg_a(tpg_a), .tpg_b(tpg_b), .a(a), .b(b));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 400; k++) begin
      sel    = k[0];
      user_a = operand_t'($urandom);
      user_b = operand_t'($urandom);
      tpg_a  = operand_t'($urandom);
      tpg_b  = operand_t'($urandom);
      #1;
      checks++;
      if (a !== (sel ? user_a : tpg_a) || b !== (sel ? user_b : tpg_b)) begin
        failures++;
        if (failures < 10)
          $display("FAIL sel=%0d user=(%0d,%0d) tpg=(%0d,%0d) got (%0d,%0d)",
                   sel, user_a, user_b, tpg_a, tpg_b, a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
