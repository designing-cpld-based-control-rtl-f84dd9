// cmcu_ct - microinstruction address counter CT of the control unit.
//
// CT holds the current microinstruction address T (T1 = t[R-1] is the most
// significant bit). On each rising clock edge:
//   start = 1  -> T <= 0       (address of the first microinstruction)
//   y0    = 1  -> T <= T + 1   (next microinstruction of the same chain)
//   else       -> T <= phi     (address formed by the block of
//                               microinstruction address)
// so one microinstruction is executed per clock. The three inputs and their
// roles come from the unit's structure (Start, +1 from y0, Phi, Clock); that
// Start acts synchronously, has priority and clears CT to the all-zero address
// of the first microinstruction is this design's choice.
module cmcu_ct #(
  parameter int unsigned R = cmcu_pkg::R     // address width
) (
  input  logic         clk,
  input  logic         start,
  input  logic         y0,
  input  logic [R-1:0] phi,
  output logic [R-1:0] t
);

  always_ff @(posedge clk) begin
    if (start)   t <= '0;
    else if (y0) t <= t + R'(1);
    else         t <= phi;
  end

endmodule
