// cmcu_pkg - sizes, types and example tables shared by the blocks of the
// compositional microprogram control unit (CMCU) with three sources of class
// codes.
//
// A CMCU walks a microprogram split into operational linear chains (OLCs).
// Inside a chain the address counter CT simply counts; at the output of a
// chain the next address is formed by the block of microinstruction address
// (BMA) from the code of the chain's class of pseudoequivalent chains and the
// logical conditions X. The class code comes from one of three sources:
//   * T  - the counter itself, for classes whose output addresses form one
//          generalized interval (set Pi_A);
//   * V  - free outputs of the control-memory PROM blocks (set Pi_E);
//   * Z  - the block of address transformer (BAT) decoding T (set Pi_D).
//
// The package holds the sizing rules of the method:
//   R0 = ceil((N+2)/t)          PROM blocks of t outputs for an N+2 bit word
//   R3 = R0*t - N - 2           free PROM outputs, |V| = R3
//   R2 = ceil(log2(I_B+1))      bits needed to code the I_B classes not in Pi_A
//   I_E = 2^R3 - 1              classes coded through V when R3 < R2
//   R4 = ceil(log2(I_D+1))      bits of Z for the remaining I_D classes
// and the numbers of the worked example Gamma_1 (R = 5 address bits, M = 31
// microinstructions, N = 13 microoperations, t = 4, I_B = 2), which make
// R0 = 4, R3 = 1, R2 = 2, I_E = 1, I_D = 1, R4 = 1.
//
// Bit order: T[R-1] is T1 (the most significant address bit, as in the
// address tables), x[i-1] is logical condition x_i, v[0] is v1, z[0] is z1.
// The number of logical conditions L = 5 is the highest index used (x5); the
// control-memory word layout {V, yE, y0, Y} is a choice of this design.
//
// The example tables below follow the worked example: the transition-table
// fragment for classes B2, B3, B4, the BAT equation for z1 and the control
// memory's control columns (y0, yE, V). Transitions of classes B1 and B5 and
// the microoperation columns Y of the example are not specified, so
// GAMMA1_TABLE has only the seven listed lines and GAMMA1_CM has Y = 0.
package cmcu_pkg;

  // ---------------------------------------------------------------- sizing
  function automatic int unsigned cm_blocks(int unsigned n, int unsigned t);
    return (n + 2 + t - 1) / t;                       // R0
  endfunction

  function automatic int unsigned free_outputs(int unsigned n, int unsigned t);
    return cm_blocks(n, t) * t - n - 2;               // R3
  endfunction

  function automatic int unsigned code_bits(int unsigned classes);
    return $clog2(classes + 1);                       // R2, R4
  endfunction

  // Classes coded on V: all of them when the free outputs suffice (R3 >= R2,
  // then there is no BAT), otherwise 2^R3 - 1 of them (code 0 is kept for the
  // classes coded elsewhere).
  function automatic int unsigned e_classes(int unsigned ib, int unsigned r3);
    return (r3 >= code_bits(ib)) ? ib : ((1 << r3) - 1);
  endfunction

  // ------------------------------------------------- example configuration
  localparam int unsigned R     = 5;    // address bits of CT
  localparam int unsigned M     = 31;   // microinstructions
  localparam int unsigned N     = 13;   // microoperations
  localparam int unsigned T_OUT = 4;    // outputs of one PROM block (t)
  localparam int unsigned L     = 5;    // logical conditions x1..x5
  localparam int unsigned I_B   = 2;    // classes not coded by an interval

  localparam int unsigned R0  = cm_blocks(N, T_OUT);
  localparam int unsigned R3  = free_outputs(N, T_OUT);
  localparam int unsigned R2  = code_bits(I_B);
  localparam int unsigned I_E = (R3 >= R2) ? I_B : ((1 << R3) - 1);
  localparam int unsigned I_D = I_B - I_E;
  localparam int unsigned R4  = code_bits(I_D);
  localparam int unsigned W   = R0 * T_OUT;          // PROM word width
  localparam int unsigned DEPTH = 1 << R;

  // ------------------------------------------------------------------ types
  typedef logic [R-1:0] addr_t;

  typedef struct packed {
    logic [R3-1:0] v;     // class code K_E on free PROM outputs
    logic          y_e;   // end of the microprogram
    logic          y0;    // 1: stay in the chain, CT <- CT + 1
    logic [N:1]    y;     // microoperations, one bit each
  } cm_word_t;

  // One line of the transition table = one product term of the BMA.
  typedef struct packed {
    logic [R-1:0]  t_mask;  // bits of T that take part in K_A (1 = used)
    logic [R-1:0]  t_val;
    logic [R3-1:0] v;       // K_E (0 for classes not in Pi_E)
    logic [R4-1:0] z;       // K_D (0 for classes not in Pi_D)
    logic [L-1:0]  x_mask;  // conditions that appear in X_h
    logic [L-1:0]  x_val;
    logic [R-1:0]  addr;    // A(b_q), loaded into CT through Phi
  } trans_row_t;

  // One line of the address-transformer table.
  typedef struct packed {
    logic [R-1:0]  addr;    // output address of a chain of a class in Pi_D
    logic [R4-1:0] code;    // K_D of that class
  } bat_row_t;

  // ------------------------------------------------------ example Gamma_1
  localparam int unsigned GAMMA1_ROWS = 7;
  localparam int unsigned GAMMA1_BAT_ROWS = 2;

  function automatic trans_row_t mk_row(logic [R-1:0] tm, logic [R-1:0] tv,
                                        logic [R3-1:0] v, logic [R4-1:0] z,
                                        logic [L-1:0] xm, logic [L-1:0] xv,
                                        logic [R-1:0] a);
    trans_row_t r;
    r.t_mask = tm; r.t_val = tv; r.v = v; r.z = z;
    r.x_mask = xm; r.x_val = xv; r.addr = a;
    return r;
  endfunction

  function automatic logic [GAMMA1_ROWS-1:0][$bits(trans_row_t)-1:0] gamma1_table();
    logic [GAMMA1_ROWS-1:0][$bits(trans_row_t)-1:0] tab;
    // B2 = 001** (K_A), V = Z = 0
    tab[0] = mk_row(5'b11100, 5'b00100, '0, '0, 5'b00100, 5'b00100, 5'b01000); // x3      -> b9
    tab[1] = mk_row(5'b11100, 5'b00100, '0, '0, 5'b00100, 5'b00000, 5'b11100); // ~x3     -> b26
    // B3: K_E = 1
    tab[2] = mk_row(5'b00000, 5'b00000, 1'b1, '0, 5'b00001, 5'b00001, 5'b10001); // x1      -> b18
    tab[3] = mk_row(5'b00000, 5'b00000, 1'b1, '0, 5'b00011, 5'b00010, 5'b10011); // ~x1 x2  -> b20
    tab[4] = mk_row(5'b00000, 5'b00000, 1'b1, '0, 5'b00011, 5'b00000, 5'b11100); // ~x1 ~x2 -> b26
    // B4: K_D = 1
    tab[5] = mk_row(5'b00000, 5'b00000, '0, 1'b1, 5'b10000, 5'b10000, 5'b11101); // x5      -> b27
    tab[6] = mk_row(5'b00000, 5'b00000, '0, 1'b1, 5'b10000, 5'b00000, 5'b00100); // ~x5     -> b5
    return tab;
  endfunction

  localparam logic [GAMMA1_ROWS-1:0][$bits(trans_row_t)-1:0] GAMMA1_TABLE = gamma1_table();

  function automatic logic [GAMMA1_BAT_ROWS-1:0][$bits(bat_row_t)-1:0] gamma1_bat();
    logic [GAMMA1_BAT_ROWS-1:0][$bits(bat_row_t)-1:0] tab;
    tab[0] = {5'b10100, 1'b1};   // output of alpha_6 (b21), class B4
    tab[1] = {5'b11000, 1'b1};   // output of alpha_7 (b25), class B4
    return tab;
  endfunction

  localparam logic [GAMMA1_BAT_ROWS-1:0][$bits(bat_row_t)-1:0] GAMMA1_BAT = gamma1_bat();

  // Chains of Gamma_1 with consecutive addresses A(b1..b25) = 0..24,
  // A(b29..b31) = 25..27, A(b26..b28) = 28..30.
  localparam int unsigned CHAINS = 9;
  localparam int unsigned CHAIN_FIRST [CHAINS] = '{0, 2, 6, 8, 13, 17, 21, 28, 25};
  localparam int unsigned CHAIN_LAST  [CHAINS] = '{1, 5, 7, 12, 16, 20, 24, 30, 27};
  // Class of each chain (1..5 for B1..B5); 0 marks alpha_9, which ends the
  // microprogram and belongs to no class of C1.
  localparam int unsigned CHAIN_CLASS [CHAINS] = '{1, 2, 2, 3, 3, 4, 4, 5, 0};
  // K_E of each class (0: not in Pi_E). Only B3 is in Pi_E, with K_E = 1.
  localparam int unsigned CLASS_KE [6] = '{0, 0, 0, 1, 0, 0};

  // Control columns of the example's control memory: y0 = 1 inside a chain,
  // y0 = 0 at a chain's output, yE = 1 at the output of alpha_9, V = K_E at
  // the outputs of chains of classes in Pi_E. Unused cells are all zero.
  function automatic logic [DEPTH-1:0][W-1:0] gamma1_cm();
    logic [DEPTH-1:0][W-1:0] mem;
    cm_word_t w;
    mem = '0;
    for (int unsigned c = 0; c < CHAINS; c++) begin
      for (int unsigned a = CHAIN_FIRST[c]; a <= CHAIN_LAST[c]; a++) begin
        w     = '0;
        w.y0  = (a != CHAIN_LAST[c]);
        w.y_e = (a == CHAIN_LAST[c]) && (CHAIN_CLASS[c] == 0);
        if (a == CHAIN_LAST[c]) w.v = R3'(CLASS_KE[CHAIN_CLASS[c]]);
        mem[a] = w;
      end
    end
    return mem;
  endfunction

  localparam logic [DEPTH-1:0][W-1:0] GAMMA1_CM = gamma1_cm();

  // Bits [k*t +: t] of every control-memory word: the content of PROM block k.
  function automatic logic [DEPTH-1:0][T_OUT-1:0] cm_block(logic [DEPTH-1:0][W-1:0] cm, int k);
    logic [DEPTH-1:0][T_OUT-1:0] s;
    for (int a = 0; a < DEPTH; a++) s[a] = cm[a][k*T_OUT +: T_OUT];
    return s;
  endfunction

endpackage
