// cmcu_u1 - compositional microprogram control unit U1 with three sources of
// class codes (top level).
//
// Structure: the counter CT holds the address T of the current
// microinstruction; the control memory CM, enabled by the fetch flip-flop TF,
// delivers the microoperations Y, the chain flag y0, the end flag yE and the
// class code V; the address transformer BAT derives the class code Z from T;
// the block of microinstruction address BMA forms Phi = Phi(T, Z, V, X).
// Every clock: y0 = 1 -> CT counts; y0 = 0 -> CT loads Phi. Start clears CT
// and sets TF; yE clears TF, which stops the unit (CM outputs go to zero).
// One microinstruction is executed per clock; Y is valid in the cycle where
// T addresses it (the control memory read is asynchronous).
//
// The wiring follows the unit's block diagram. The parameters are the
// transition table (BMA), the address-transformer table (BAT) and the
// control-memory content, with defaults from the example: the BMA has only
// the seven specified transition lines (classes B2, B3, B4) and Y = 0 in all
// cells, since the example specifies neither the transitions of B1 and B5 nor
// the microoperations. A user supplies both for a real microprogram.
// While TF = 0, CT keeps following Phi (CT has no enable in the structure);
// this is harmless because the outputs are zero and Start restarts from 0.
module cmcu_u1
  import cmcu_pkg::*;
#(
  parameter int unsigned               BMA_ROWS  = GAMMA1_ROWS,
  parameter trans_row_t [BMA_ROWS-1:0] BMA_TABLE = GAMMA1_TABLE,
  parameter int unsigned               BAT_ROWS  = GAMMA1_BAT_ROWS,
  parameter bat_row_t [BAT_ROWS-1:0]   BAT_TABLE = GAMMA1_BAT,
  parameter logic [DEPTH-1:0][W-1:0]   CM_CONTENT = GAMMA1_CM
) (
  input  logic         clk,
  input  logic         start,
  input  logic [L-1:0] x,       // logical conditions, x[i-1] = x_i
  output logic [N:1]   y,       // microoperations
  output logic         fetch,   // 1 while the microprogram runs
  output logic [R-1:0] addr     // current microinstruction address T
);

  logic [R-1:0]  t;
  logic [R-1:0]  phi;
  logic [R4-1:0] z;
  cm_word_t      word;

  cmcu_ct #(.R(R)) u_ct (
    .clk  (clk),
    .start(start),
    .y0   (word.y0),
    .phi  (phi),
    .t    (t)
  );

  cmcu_control_memory #(.CONTENT(CM_CONTENT)) u_cm (
    .t    (t),
    .fetch(fetch),
    .word (word)
  );

  cmcu_bat #(.ROWS(BAT_ROWS), .TABLE(BAT_TABLE)) u_bat (
    .t(t),
    .z(z)
  );

  cmcu_bma #(.ROWS(BMA_ROWS), .TABLE(BMA_TABLE)) u_bma (
    .t  (t),
    .v  (word.v),
    .z  (z),
    .x  (x),
    .phi(phi)
  );

  cmcu_tf u_tf (
    .clk  (clk),
    .start(start),
    .y_e  (word.y_e),
    .fetch(fetch)
  );

  assign y    = word.y;
  assign addr = t;

  // A class is coded by exactly one source: V and Z are never both active.
  always_ff @(posedge clk) begin
    if (fetch) assert (!((|word.v) && (|z)))
      else $error("cmcu_u1: V and Z both non-zero at T=%b", t);
  end

endmodule
