// cmcu_ref_pkg - reference model of the example control unit, used by the
// testbenches. It is written directly from the example's address map, chain
// list, transition formulae and the equation of z1, without the tables of
// cmcu_pkg, so that the RTL is compared against an independent description.
//
// Address map: b1..b25 at 0..24, b29..b31 at 25..27, b26..b28 at 28..30,
// cell 31 unused. Chain outputs: b2, b6, b8, b13, b17, b21, b25, b28 (classes
// B1, B2, B2, B3, B3, B4, B4, B5) and b31 (end of the microprogram).
package cmcu_ref_pkg;

  function automatic bit is_output(int a);
    return a inside {1, 5, 7, 12, 16, 20, 24, 30, 27};
  endfunction

  function automatic bit ref_y0(int a);
    return (a <= 30) && !is_output(a);
  endfunction

  function automatic bit ref_ye(int a);
    return a == 27;                      // output of alpha_9 (b31 = 11011)
  endfunction

  function automatic bit ref_v1(int a);
    return a == 12 || a == 16;           // outputs of B3 (01100, 10000)
  endfunction

  // z1 = T1 ~T2 T3 ~T4 ~T5 | T1 T2 ~T3 ~T4 ~T5
  function automatic bit ref_z1(logic [4:0] t);
    bit t1, t2, t3, t4, t5;
    {t1, t2, t3, t4, t5} = t;
    return (t1 & !t2 & t3 & !t4 & !t5) | (t1 & t2 & !t3 & !t4 & !t5);
  endfunction

  // Next address from the transition formulae of B2, B3, B4. With ext = 1 the
  // testbench's own transitions for B1 and B5 are added (B1 -> x4 b3, ~x4 b7;
  // B5 -> x4 b29, ~x4 b1), which the example leaves open.
  function automatic logic [4:0] ref_phi(logic [4:0] t, bit v1, bit z1,
                                         logic [4:0] x, bit ext);
    bit x1, x2, x3, x4, x5;
    {x5, x4, x3, x2, x1} = x;
    if (!v1 && !z1 && t[4:2] == 3'b001) return x3 ? 5'b01000 : 5'b11100;
    if (v1 && !z1) return x1 ? 5'b10001 : (x2 ? 5'b10011 : 5'b11100);
    if (!v1 && z1) return x5 ? 5'b11101 : 5'b00100;
    if (ext && !v1 && !z1 && t[4:1] == 4'b0000) return x4 ? 5'b00010 : 5'b00110;
    if (ext && !v1 && !z1 && t[4:2] == 3'b111) return x4 ? 5'b11001 : 5'b00000;
    return 5'b00000;
  endfunction

  // Microoperation pattern the testbenches load into the Y columns.
  function automatic logic [13:1] y_pattern(int a);
    return 13'((a * 1237 + 91) ^ (a << 7));
  endfunction

endpackage
