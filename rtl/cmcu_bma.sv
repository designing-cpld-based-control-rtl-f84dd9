// cmcu_bma - block of microinstruction address (BMA).
//
// Combinational block computing the excitation functions Phi = Phi(T, Z, V, X)
// of the counter CT. Each line h of the transition table is one product term:
// it fires when the class code matches and the condition conjunction X_h is
// true, and then contributes the address A(b_q) to Phi (a sum of products, as
// on the wide-fan-in PAL macrocells the method targets). The class code of a
// line is matched as follows:
//   * classes in Pi_A: V = 0, Z = 0 and T inside the interval K_A (t_mask
//     selects the bits of T that are not "don't care");
//   * classes in Pi_E: V = K_E, Z = 0, T ignored;
//   * classes in Pi_D: V = 0, Z = K_D, T ignored.
// The table is a parameter; its default is the seven-line transition-table
// fragment of the example (classes B2, B3, B4). If no line fires, Phi = 0;
// lines of a proper table are mutually exclusive, which an assertion checks.
// Interface: t (R bits), v (R3), z (R4), x (L); phi (R). Purely combinational.
module cmcu_bma
  import cmcu_pkg::*;
#(
  parameter int unsigned             ROWS  = GAMMA1_ROWS,
  parameter trans_row_t [ROWS-1:0]   TABLE = GAMMA1_TABLE
) (
  input  logic [R-1:0]  t,
  input  logic [R3-1:0] v,
  input  logic [R4-1:0] z,
  input  logic [L-1:0]  x,
  output logic [R-1:0]  phi
);

  logic [ROWS-1:0] term;

  always_comb begin
    phi = '0;
    for (int unsigned h = 0; h < ROWS; h++) begin
      term[h] = ((t & TABLE[h].t_mask) == TABLE[h].t_val)
             && (v == TABLE[h].v)
             && (z == TABLE[h].z)
             && ((x & TABLE[h].x_mask) == TABLE[h].x_val);
      if (term[h]) phi = phi | TABLE[h].addr;
    end
  end

  // At most one line of the transition table may fire.
  always_comb begin
    assert ((term & (term - 1'b1)) == '0)
      else $error("cmcu_bma: transition-table lines %b fire together", term);
  end

endmodule
