// cmcu_tf - fetch flip-flop TF of the control unit.
//
// TF is an RS flip-flop whose output Fetch enables reading of the control
// memory. Start sets it, so the unit begins executing; the end-of-program
// microoperation yE resets it, so the unit stops. Both act on the rising
// clock edge, and Start wins when both are 1 (this design's choice: the
// structure names only the S and R inputs). Fetch is the registered output.
module cmcu_tf (
  input  logic clk,
  input  logic start,   // S
  input  logic y_e,     // R
  output logic fetch
);

  always_ff @(posedge clk) begin
    if (start)    fetch <= 1'b1;
    else if (y_e) fetch <= 1'b0;
  end

endmodule
