// tb_cmcu_u1 - end-to-end testbench of the control unit.
//
// The unit runs the example microprogram. Because the example leaves the
// transitions of classes B1 and B5 and the microoperations open, the
// testbench completes it: two transition lines per class (B1 -> x4 b3,
// ~x4 b7; B5 -> x4 b29, ~x4 b1) are appended to the seven example lines, and
// the Y columns get a generated pattern. The conditions X are random; every
// run starts with Start and ends when yE clears Fetch (or after a cycle cap,
// as the microprogram may loop). A cycle-accurate reference model checks T, Y
// and Fetch in every cycle: one microinstruction per clock.
// Counted mechanisms: counting inside a chain, a jump from a class coded by T
// (Pi_A), by V (Pi_E) and by Z (Pi_D), each of the seven example lines, the
// stop by yE, a restart by Start, and a Start during a run.
module tb_cmcu_u1;
  import cmcu_pkg::*;
  import cmcu_ref_pkg::*;

  localparam int unsigned ROWS = GAMMA1_ROWS + 4;

  function automatic logic [ROWS-1:0][$bits(trans_row_t)-1:0] ext_table();
    logic [ROWS-1:0][$bits(trans_row_t)-1:0] tab;
    tab[GAMMA1_ROWS-1:0] = GAMMA1_TABLE;
    tab[GAMMA1_ROWS+0] = mk_row(5'b11110, 5'b00000, '0, '0, 5'b01000, 5'b01000, 5'b00010);
    tab[GAMMA1_ROWS+1] = mk_row(5'b11110, 5'b00000, '0, '0, 5'b01000, 5'b00000, 5'b00110);
    tab[GAMMA1_ROWS+2] = mk_row(5'b11100, 5'b11100, '0, '0, 5'b01000, 5'b01000, 5'b11001);
    tab[GAMMA1_ROWS+3] = mk_row(5'b11100, 5'b11100, '0, '0, 5'b01000, 5'b00000, 5'b00000);
    return tab;
  endfunction

  function automatic logic [DEPTH-1:0][W-1:0] ext_cm();
    logic [DEPTH-1:0][W-1:0] m;
    cm_word_t w;
    m = GAMMA1_CM;
    for (int a = 0; a < DEPTH; a++) begin
      w = m[a];
      w.y = y_pattern(a);
      m[a] = w;
    end
    return m;
  endfunction

  logic clk = 0, start;
  logic [L-1:0] x;
  logic [N:1] y;
  logic fetch;
  logic [R-1:0] addr;

  cmcu_u1 #(
    .BMA_ROWS  (ROWS),
    .BMA_TABLE (ext_table()),
    .CM_CONTENT(ext_cm())
  ) dut (.clk, .start, .x, .y, .fetch, .addr);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_count = 0, n_jump_a = 0, n_jump_e = 0, n_jump_d = 0, n_stop = 0;
  int n_restart = 0, n_start_run = 0, n_runs_done = 0;
  int n_line [7];

  // reference state
  logic [4:0] mt;
  bit mf;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_outputs();
    logic [13:1] exp_y;
    exp_y = mf ? y_pattern(int'(mt)) : '0;
    checks++;
    if (addr !== mt || fetch !== mf || y !== exp_y) begin
      failures++;
      if (failures < 20)
        $display("%0t: T=%b fetch=%b y=%h, expected T=%b fetch=%b y=%h",
                 $time, addr, fetch, y, mt, mf, exp_y);
    end
  endtask

  // one clock: inputs are applied after the falling edge, the model steps
  // with the rising edge
  task automatic step(bit st);
    bit y0, ye, v1, z1;
    logic [4:0] nxt;
    @(negedge clk);
    start = st;
    x = L'($urandom);
    #1;
    check_outputs();
    y0 = mf && ref_y0(int'(mt));
    ye = mf && ref_ye(int'(mt));
    v1 = mf && ref_v1(int'(mt));
    z1 = ref_z1(mt);
    nxt = ref_phi(mt, v1, z1, x, 1'b1);
    if (st) begin
      if (mf && !ye) n_start_run++;
      mt = '0; mf = 1;
    end else begin
      if (y0) begin mt = mt + 1; if (mf) n_count++; end
      else begin
        if (mf) begin
          if (v1) n_jump_e++;
          else if (z1) n_jump_d++;
          else if (!ye) n_jump_a++;
          // which example line fired
          if (!v1 && !z1 && mt[4:2] == 3'b001) n_line[x[2] ? 0 : 1]++;
          if (v1) n_line[x[0] ? 2 : (x[1] ? 3 : 4)]++;
          if (z1) n_line[x[4] ? 5 : 6]++;
        end
        mt = nxt;
      end
      if (ye) begin mf = 0; n_stop++; end
    end
  endtask

  initial begin
    int cyc;
    foreach (n_line[i]) n_line[i] = 0;
    start = 1; x = '0;
    // first Start initialises the unit and the model
    @(negedge clk); @(posedge clk); #1;
    mt = '0; mf = 1;
    for (int run = 0; run < 300; run++) begin
      // a run: execute until yE or a cap; occasionally Start mid-run
      cyc = 0;
      while (mf && cyc < 60) begin
        step((run % 37 == 5) && cyc == 10);
        cyc++;
      end
      if (!mf) n_runs_done++;
      // idle a few cycles with Fetch = 0, then restart
      for (int i = 0; i < 3; i++) step(1'b0);
      step(1'b1);
      n_restart++;
    end
    for (int i = 0; i < 5; i++) step(1'b0);

    $display("count=%0d jumpA=%0d jumpE=%0d jumpD=%0d stop=%0d restart=%0d start_in_run=%0d",
             n_count, n_jump_a, n_jump_e, n_jump_d, n_stop, n_restart, n_start_run);
    checks += 7;
    if (n_count == 0)     begin failures++; $display("no counting"); end
    if (n_jump_a == 0)    begin failures++; $display("no jump from Pi_A"); end
    if (n_jump_e == 0)    begin failures++; $display("no jump from Pi_E"); end
    if (n_jump_d == 0)    begin failures++; $display("no jump from Pi_D"); end
    if (n_stop == 0)      begin failures++; $display("no stop by yE"); end
    if (n_restart == 0)   begin failures++; $display("no restart"); end
    if (n_start_run == 0) begin failures++; $display("no Start during a run"); end
    foreach (n_line[i]) begin
      checks++;
      if (n_line[i] == 0) begin failures++; $display("line %0d never taken", i + 1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
