// tb_cmcu_u1_full - testbench of the control unit with all parameters at
// their defaults: the example's seven transition lines, its address
// transformer and its control memory (Y columns zero).
// After Start the unit executes chain alpha_1 (b1, b2); the transitions of its
// class B1 are not part of the default table, so Phi = 0 and the unit returns
// to b1. The testbench checks this address sequence, one microinstruction per
// clock, Fetch staying 1 and Y = 0, and a second Start mid-sequence.
module tb_cmcu_u1_full;
  logic clk = 0, start;
  logic [4:0] x;
  logic [13:1] y;
  logic fetch;
  logic [4:0] addr;
  int checks = 0, failures = 0;
  int n_count = 0, n_load = 0;

  cmcu_u1 dut (.clk, .start, .x, .y, .fetch, .addr);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] exp_t;
    start = 1; x = '0;
    @(negedge clk); @(negedge clk);
    start = 0;
    exp_t = 5'b00000;
    for (int i = 0; i < 200; i++) begin
      x = 5'($urandom);
      if (i == 101) start = 1;
      #1;
      checks++;
      if (addr !== exp_t || fetch !== 1'b1 || y !== '0) begin
        failures++;
        $display("cycle %0d: T=%b fetch=%b y=%h expected T=%b", i, addr, fetch, y, exp_t);
      end
      @(negedge clk);
      if (start) exp_t = '0;
      else if (exp_t == 5'b00000) begin exp_t = 5'b00001; n_count++; end
      else begin exp_t = 5'b00000; n_load++; end
      start = 0;
    end
    checks++; if (n_count == 0 || n_load == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
