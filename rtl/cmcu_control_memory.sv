// cmcu_control_memory - control memory (CM) of the control unit.
//
// Holds one word per microinstruction: the microoperations Y (one bit each,
// N bits), y0 (stay in the chain) and yE (end of program), N+2 bits in all,
// built from R0 = ceil((N+2)/t) PROM blocks of t outputs each. The
// R3 = R0*t - N - 2 outputs left free carry the class code V of the classes
// in Pi_E. Block k holds bits [k*t +: t] of the word; word layout is
// {V, yE, y0, Y} (cmcu_pkg::cm_word_t). The read at address T is
// asynchronous; while Fetch = 0 the outputs are forced to zero, so nothing is
// executed and yE/y0 are inactive.
// Interface: t (R), fetch in; word (cm_word_t) out.
module cmcu_control_memory
  import cmcu_pkg::*;
#(
  parameter logic [DEPTH-1:0][W-1:0] CONTENT = GAMMA1_CM
) (
  input  logic [R-1:0] t,
  input  logic         fetch,
  output cm_word_t     word
);

  logic [W-1:0] raw;

  // The cells must hold all M microinstructions.
  if (DEPTH < M) begin : g_depth_check
    $error("control memory has %0d cells for %0d microinstructions", DEPTH, M);
  end

  for (genvar k = 0; k < R0; k++) begin : g_block
    cmcu_prom_block #(
      .ADDR_W (R),
      .WIDTH  (T_OUT),
      .CONTENT(cm_block(CONTENT, k))
    ) u_prom (
      .addr(t),
      .data(raw[k*T_OUT +: T_OUT])
    );
  end

  assign word = fetch ? cm_word_t'(raw) : '0;

endmodule
