// cmcu_bat - block of address transformer (BAT).
//
// Combinational block Z = Z(T). For every class of pseudoequivalent chains in
// Pi_D (classes whose output addresses are neither one interval of T nor coded
// on free control-memory outputs) it recognises the output addresses of the
// class's chains and drives the class code K_D on Z; elsewhere Z = 0. The table
// is a parameter: each line is an output address and its code, and Z is the
// OR of the codes of the matching lines. The default is the example's table,
// z1 = 1 at addresses 10100 and 11000.
// Interface: t (R bits) in, z (R4 bits) out. Purely combinational.
module cmcu_bat
  import cmcu_pkg::*;
#(
  parameter int unsigned           ROWS  = GAMMA1_BAT_ROWS,
  parameter bat_row_t [ROWS-1:0]   TABLE = GAMMA1_BAT
) (
  input  logic [R-1:0]  t,
  output logic [R4-1:0] z
);

  always_comb begin
    z = '0;
    for (int unsigned i = 0; i < ROWS; i++)
      if (t == TABLE[i].addr) z = z | TABLE[i].code;
  end

endmodule
