// tb_cmcu_pkg - checks the sizing rules of cmcu_pkg.
// The example's numbers (N = 13, t = 4, I_B = 2) must give R0 = 4, R3 = 1,
// R2 = 2, I_E = 1, I_D = 1, R4 = 1 and a 16-bit control-memory word. The
// functions are also swept over N = 1..64 and t in {1, 2, 4, 8, 16} and over
// class counts 0..40, against values found by search (smallest block count
// covering N + 2 bits, smallest code width covering I + 1 codes).
module tb_cmcu_pkg;
  import cmcu_pkg::*;
  int checks = 0, failures = 0;

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s = %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r0, r;
    expect_eq("R0", R0, 4);
    expect_eq("R3", R3, 1);
    expect_eq("R2", R2, 2);
    expect_eq("I_E", I_E, 1);
    expect_eq("I_D", I_D, 1);
    expect_eq("R4", R4, 1);
    expect_eq("W", W, 16);
    expect_eq("cm_word_t", $bits(cm_word_t), 16);
    expect_eq("e_classes(2,2)", e_classes(2, 2), 2);   // R3 >= R2: no BAT
    expect_eq("e_classes(5,2)", e_classes(5, 2), 3);
    for (int n = 1; n <= 64; n++) begin
      for (int k = 0; k < 5; k++) begin
        int t = 1 << k;
        r0 = 1;
        while (r0 * t < n + 2) r0++;
        expect_eq($sformatf("cm_blocks(%0d,%0d)", n, t), cm_blocks(n, t), r0);
        expect_eq($sformatf("free_outputs(%0d,%0d)", n, t), free_outputs(n, t), r0 * t - n - 2);
      end
    end
    for (int i = 0; i <= 40; i++) begin
      r = 0;
      while ((1 << r) < i + 1) r++;
      expect_eq($sformatf("code_bits(%0d)", i), code_bits(i), r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
