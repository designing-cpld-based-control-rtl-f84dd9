// cmcu_prom_block - one PROM block of the control memory.
//
// A read-only memory of 2^ADDR_W cells with WIDTH outputs (t in the method's
// terms, one of 1, 2, 4, 8 or 16 on the targeted devices). The content is a
// parameter, cell a in CONTENT[a]; the default is the first block of the
// example's control memory. The read is asynchronous: data follows addr
// combinationally, as the address register CT in front of it already holds
// the address for the whole clock period.
module cmcu_prom_block #(
  parameter int unsigned                             ADDR_W  = cmcu_pkg::R,
  parameter int unsigned                             WIDTH   = cmcu_pkg::T_OUT,
  parameter logic [(1<<ADDR_W)-1:0][WIDTH-1:0]       CONTENT = cmcu_pkg::cm_block(cmcu_pkg::GAMMA1_CM, 0)
) (
  input  logic [ADDR_W-1:0] addr,
  output logic [WIDTH-1:0]  data
);

  // The content parameter is the ROM: a constant table indexed by the address.
  assign data = CONTENT[addr];

endmodule
