// tb_product_compare: equal products must give 1, products that differ in
// any single bit or at random must give 0.
module tb_product_compare;
  import bist_pkg::*;
  product_t a, b;
  logic     c;
  int checks = 0, failures = 0;

  product_compare dut (.a(a), .b(b), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic want);
    #1;
    checks++;
    if (c !== want) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d b=%0d got %0d want %0d", a, b, c, want);
    end
  endtask

  initial begin
    for (int k = 0; k < 256; k++) begin
      a = product_t'(k); b = product_t'(k);
      check(1'b1);
      for (int i = 0; i < PW; i++) begin
        b = product_t'(k) ^ product_t'(1 << i);
        check(1'b0);
      end
    end
    for (int k = 0; k < 200; k++) begin
      a = product_t'($urandom); b = product_t'($urandom);
      check(a == b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
