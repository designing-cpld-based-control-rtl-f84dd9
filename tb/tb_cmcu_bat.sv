// tb_cmcu_bat - self-checking testbench of the address transformer.
// Applies all 32 addresses and compares z1 with the sum-of-products equation
// z1 = T1 ~T2 T3 ~T4 ~T5 | T1 T2 ~T3 ~T4 ~T5.
module tb_cmcu_bat;
  import cmcu_ref_pkg::*;
  logic [4:0] t;
  logic [0:0] z;
  int checks = 0, failures = 0, n_active = 0;

  cmcu_bat dut (.t, .z);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 32; a++) begin
      t = 5'(a);
      #1;
      checks++;
      if (z[0] !== ref_z1(t)) begin
        failures++;
        $display("T=%b z1=%b expected %b", t, z[0], ref_z1(t));
      end
      if (z[0]) n_active++;
    end
    checks++; if (n_active != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
