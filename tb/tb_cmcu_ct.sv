// tb_cmcu_ct - self-checking testbench of the address counter CT.
// Drives random start / y0 / phi and compares T with a software counter:
// start clears, y0 counts (with wrap-around at 2^R), otherwise phi is loaded.
module tb_cmcu_ct;
  localparam int unsigned R = 5;
  logic clk = 0, start, y0;
  logic [R-1:0] phi, t;
  logic [R-1:0] exp_t;
  int checks = 0, failures = 0;
  int n_start = 0, n_inc = 0, n_load = 0, n_wrap = 0;

  cmcu_ct #(.R(R)) dut (.clk, .start, .y0, .phi, .t);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 1; y0 = 0; phi = '0;
    @(posedge clk); #1;
    exp_t = '0;
    checks++; if (t !== exp_t) begin failures++; $display("start: t=%b", t); end
    for (int i = 0; i < 2000; i++) begin
      start = ($urandom_range(0, 19) == 0);
      y0    = ($urandom_range(0, 2) != 0);
      phi   = R'($urandom);
      @(posedge clk); #1;
      if (start) begin exp_t = '0; n_start++; end
      else if (y0) begin
        if (exp_t == '1) n_wrap++;
        exp_t = R'(exp_t + 1); n_inc++;
      end
      else begin exp_t = phi; n_load++; end
      checks++;
      if (t !== exp_t) begin
        failures++;
        $display("cycle %0d: t=%b expected %b", i, t, exp_t);
      end
    end
    checks++; if (n_start == 0 || n_inc == 0 || n_load == 0) failures++;
    $display("start=%0d inc=%0d load=%0d wrap=%0d", n_start, n_inc, n_load, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
