// tb_cmcu_bma - self-checking testbench of the block of microinstruction
// address with the example's transition table.
// Applies every combination of T (5 bits), v1, z1 and x1..x5 and compares Phi
// with the transition formulae of classes B2, B3 and B4 (Phi = 0 where no
// line applies), and D1, D2 with their sum-of-products expressions.
module tb_cmcu_bma;
  import cmcu_ref_pkg::*;
  logic [4:0] t, x, phi, exp_phi;
  logic [0:0] v, z;
  int checks = 0, failures = 0;
  int hits [8];

  cmcu_bma dut (.t, .v, .z, .x, .phi);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit t1, t2, t3, x1, x2, x3, x5, v1, z1, d1, d2;
    for (int i = 0; i < 8; i++) hits[i] = 0;
    for (int i = 0; i < 4096; i++) begin
      {v, z, t, x} = 12'(i);
      #1;
      exp_phi = ref_phi(t, v[0], z[0], x, 1'b0);
      checks++;
      if (phi !== exp_phi) begin
        failures++;
        $display("T=%b v=%b z=%b x=%b phi=%b expected %b", t, v, z, x, phi, exp_phi);
      end
      // D1, D2 as printed sums of products
      {t1, t2, t3} = t[4:2];
      x1 = x[0]; x2 = x[1]; x3 = x[2]; x5 = x[4];
      v1 = v[0]; z1 = z[0];
      d1 = (!t1 && !t2 && t3 && !v1 && !z1 && !x3) || (v1 && !z1) || (!v1 && z1 && x5);
      d2 = (!t1 && !t2 && t3 && !v1 && !z1) || (v1 && !z1 && !x1 && !x2) || (!v1 && z1 && x5);
      checks += 2;
      if (phi[4] !== d1) failures++;
      if (phi[3] !== d2) failures++;
      case (exp_phi)
        5'b01000: hits[1]++;
        5'b11100: hits[2]++;
        5'b10001: hits[3]++;
        5'b10011: hits[4]++;
        5'b11101: hits[5]++;
        5'b00100: hits[6]++;
        default:  hits[0]++;
      endcase
    end
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (hits[i] == 0) begin failures++; $display("target %0d never produced", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
