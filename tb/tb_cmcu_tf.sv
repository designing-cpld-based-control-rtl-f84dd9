// tb_cmcu_tf - self-checking testbench of the fetch flip-flop TF.
// Random start (S) and yE (R); Fetch must be set by start, cleared by yE,
// held otherwise, with start winning when both are 1.
module tb_cmcu_tf;
  logic clk = 0, start, y_e, fetch;
  logic exp_f;
  int checks = 0, failures = 0;
  int n_set = 0, n_clr = 0, n_both = 0, n_hold = 0;

  cmcu_tf dut (.clk, .start, .y_e, .fetch);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 1; y_e = 0;
    @(posedge clk); #1;
    exp_f = 1;
    checks++; if (fetch !== 1'b1) failures++;
    for (int i = 0; i < 1000; i++) begin
      start = ($urandom_range(0, 3) == 0);
      y_e   = ($urandom_range(0, 3) == 0);
      @(posedge clk); #1;
      if (start) begin exp_f = 1; n_set++; if (y_e) n_both++; end
      else if (y_e) begin exp_f = 0; n_clr++; end
      else n_hold++;
      checks++;
      if (fetch !== exp_f) begin
        failures++;
        $display("cycle %0d: start=%b y_e=%b fetch=%b expected %b", i, start, y_e, fetch, exp_f);
      end
    end
    checks++; if (n_set == 0 || n_clr == 0 || n_both == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
