// tb_bist_vedic_multiplier: end-to-end test of the BIST Vedic multiplier
// with a behavioural circuit under test attached, at the default (and only)
// configuration.
//
// Phases:
//   1. reset with sel = 1 and operands 15, 15: product 225;
//   2. user mode, all 256 operand pairs, healthy CUT: product = a*b, the CUT
//      sees the user operands, cut_result = 1;
//   3. self-test mode after reset with enable low: the generators hold 0;
//   4. self-test mode with enable high: products 0, 6, 42, 196, 156, 72,
//      one per clock, repeating every six clocks, cut_result = 1;
//   5. every single stuck-at fault on the CUT product (16 faults), first over
//      one self-test period, then over all user operand pairs: cut_result
//      must equal "CUT product == a*b" at every step, one self-test period
//      must catch 15 faults (all but bit 0 stuck at 0, since every
//      generated pair has an even product), and the exhaustive user-mode
//      sweep must catch every fault;
//   6. sel switched between modes while the generators run, and an
//      asynchronous reset between clock edges.
// Each mechanism is counted; one that never happens counts as a failure.
module tb_bist_vedic_multiplier;
  import bist_pkg::*;
  logic       clock = 1'b0;
  logic       reset, enable, sel;
  operand_t   multiplier, multiplicand, cut_a, cut_b;
  product_t   cut_product, product;
  logic       cut_result;
  logic       fault_en, fault_val;
  logic [2:0] fault_bit;
  int checks = 0, failures = 0;

  int n_user = 0, n_selftest = 0, n_wrap = 0, n_hold = 0, n_pass = 0,
      n_fail_flagged = 0, n_mode_switch = 0, n_async_reset = 0;

  localparam int PROD[6] = '{0, 6, 42, 196, 156, 72};
  localparam int GEN_A[6] = '{0, 3, 6, 14, 13, 8};
  localparam int GEN_B[6] = '{0, 2, 7, 14, 12, 9};

  // Reference position of the generators: enabled clocks since reset, mod 6.
  // (Enable is only ever low here while the generators are in their reset state.)
  int step;
  always_ff @(posedge clock or posedge reset) begin
    if (reset)       step <= 0;
    else if (enable) step <= (step + 1) % 6;
  end

  bist_vedic_multiplier dut (
    .clock(clock), .reset(reset), .enable(enable), .sel(sel),
    .multiplier(multiplier), .multiplicand(multiplicand),
    .cut_a(cut_a), .cut_b(cut_b), .cut_product(cut_product),
    .product(product), .cut_result(cut_result)
  );

  cut_multiplier_model cut (
    .a(cut_a), .b(cut_b), .fault_en(fault_en), .fault_bit(fault_bit),
    .fault_val(fault_val), .product(cut_product)
  );

  always #5 clock = ~clock;

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endfunction

  // Verdict and product against values computed here from the operands.
  function automatic void check_outputs(string what);
    int       golden;
    product_t healthy;
    golden  = int'(cut_a) * int'(cut_b);
    healthy = product_t'(golden);
    check(product == healthy, $sformatf("%s: product %0d want %0d", what, product, golden));
    check(cut_result == (cut_product == healthy),
          $sformatf("%s: cut_result %0d with cut_product %0d, reference %0d",
                    what, cut_result, cut_product, golden));
    if (cut_result) n_pass++;
    else            n_fail_flagged++;
  endfunction

  initial begin
    int  wrap_at;
    int  n_caught_selftest;
    logic caught, caught_selftest, missed_bit0_sa0;

    fault_en = 1'b0; fault_bit = '0; fault_val = 1'b0;

    // 1. Reset, user operands 15 x 15.
    reset = 1'b1; enable = 1'b1; sel = 1'b1;
    multiplier = 4'd15; multiplicand = 4'd15;
    repeat (2) @(posedge clock);
    #1 check(product == 8'd225, $sformatf("15*15 gave %0d", product));
    check_outputs("reset, user 15x15");

    // 2. User mode, all operand pairs.
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        multiplier = operand_t'(i); multiplicand = operand_t'(j);
        #1;
        check(cut_a == multiplier && cut_b == multiplicand, "user operands not passed to CUT");
        check(cut_result == 1'b1, $sformatf("healthy CUT flagged at %0d*%0d", i, j));
        check_outputs("user mode");
        n_user++;
      end
    end

    // 3. Self-test, enable low from reset: generators hold 0000.
    sel = 1'b0; enable = 1'b0;
    @(negedge clock) reset = 1'b1;
    @(negedge clock) reset = 1'b0;
    repeat (5) begin
      @(posedge clock); #1;
      check(cut_a == '0 && cut_b == '0 && product == '0, "enable low: generators did not hold 0");
      check_outputs("enable low");
      n_hold++;
    end

    // 4. Self-test, enable high: three periods.
    enable = 1'b1;
    wrap_at = -1;
    for (int k = 1; k <= 18; k++) begin
      @(posedge clock); #1;
      check(int'(cut_a) == GEN_A[step] && int'(cut_b) == GEN_B[step],
            $sformatf("self-test step %0d: operands (%0d,%0d)", k, cut_a, cut_b));
      check(int'(product) == PROD[k % 6],
            $sformatf("self-test step %0d: product %0d want %0d", k, product, PROD[k % 6]));
      check(cut_result == 1'b1, "healthy CUT flagged in self-test");
      check_outputs("self-test");
      n_selftest++;
      if (k % 6 == 0) n_wrap++;
      if (wrap_at < 0 && product == '0) wrap_at = k;
    end
    check(wrap_at == 6, $sformatf("self-test period %0d clocks, want 6", wrap_at));

    // 5. Stuck-at faults on the CUT product.
    n_caught_selftest = 0;
    missed_bit0_sa0   = 1'b0;
    for (int f = 0; f < 2 * PW; f++) begin
      fault_en  = 1'b1;
      fault_bit = 3'(f / 2);
      fault_val = f[0];
      sel = 1'b0;
      caught_selftest = 1'b0;
      repeat (6) begin
        @(posedge clock); #1;
        check_outputs($sformatf("self-test, bit %0d stuck at %0d", f / 2, f % 2));
        if (!cut_result) caught_selftest = 1'b1;
      end
      if (caught_selftest) n_caught_selftest++;
      else if (f == 0)     missed_bit0_sa0 = 1'b1;
      sel = 1'b1;
      caught = 1'b0;
      for (int i = 0; i < 16; i++) begin
        for (int j = 0; j < 16; j++) begin
          multiplier = operand_t'(i); multiplicand = operand_t'(j);
          #1;
          check_outputs($sformatf("user, bit %0d stuck at %0d", f / 2, f % 2));
          if (!cut_result) caught = 1'b1;
        end
      end
      check(caught, $sformatf("stuck-at %0d on bit %0d never caught", f % 2, f / 2));
    end
    fault_en = 1'b0;
    // Every self-test operand pair has an even product, so bit 0 stuck at 0
    // is the one output stuck-at fault a self-test period cannot expose.
    $display("self-test period caught %0d of %0d output stuck-at faults", n_caught_selftest, 2 * PW);
    check(n_caught_selftest == 2 * PW - 1 && missed_bit0_sa0,
          $sformatf("self-test caught %0d faults, want %0d (all but bit 0 stuck at 0)",
                    n_caught_selftest, 2 * PW - 1));

    // 6. Mode switches while the generators run, then asynchronous reset.
    multiplier = 4'd11; multiplicand = 4'd13;
    for (int k = 0; k < 12; k++) begin
      @(posedge clock); #1;
      sel = k[0];
      #1;
      if (sel) check(product == 8'd143, $sformatf("after switch to user: %0d", product));
      else     check(int'(cut_a) == GEN_A[step] && int'(cut_b) == GEN_B[step],
                     $sformatf("after switch to self-test: (%0d,%0d) want (%0d,%0d)",
                               cut_a, cut_b, GEN_A[step], GEN_B[step]));
      check_outputs("mode switch");
      n_mode_switch++;
    end
    sel = 1'b0;
    @(posedge clock); #1;
    @(posedge clock); #2;
    reset = 1'b1;
    #1;
    check(cut_a == '0 && cut_b == '0 && product == '0, "asynchronous reset did not clear generators");
    check_outputs("after asynchronous reset");
    n_async_reset++;
    #1 reset = 1'b0;

    $display("mechanisms: user=%0d selftest=%0d wrap=%0d enable_hold=%0d pass=%0d fail_flagged=%0d mode_switch=%0d async_reset=%0d",
             n_user, n_selftest, n_wrap, n_hold, n_pass, n_fail_flagged, n_mode_switch, n_async_reset);
    check(n_user > 0,         "user mode never exercised");
    check(n_selftest > 0,     "self-test never exercised");
    check(n_wrap > 0,         "generator never wrapped");
    check(n_hold > 0,         "enable-low hold never exercised");
    check(n_pass > 0,         "pass verdict never seen");
    check(n_fail_flagged > 0, "fail verdict never seen");
    check(n_mode_switch > 0,  "mode switch never exercised");
    check(n_async_reset > 0,  "asynchronous reset never exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
