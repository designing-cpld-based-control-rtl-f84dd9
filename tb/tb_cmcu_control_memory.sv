// tb_cmcu_control_memory - self-checking testbench of the control memory.
// Instance 1 holds the example's content: y0, yE and v1 are checked at every
// address against the chain list, Y must be 0, and all outputs must be 0 while
// Fetch = 0. Instance 2 holds a generated content, one distinct word per cell,
// which checks that the four PROM blocks place their bits in the right part of
// the word.
module tb_cmcu_control_memory;
  import cmcu_pkg::*;
  import cmcu_ref_pkg::*;

  function automatic logic [DEPTH-1:0][W-1:0] gen_content();
    logic [DEPTH-1:0][W-1:0] m;
    for (int a = 0; a < DEPTH; a++) m[a] = W'((a * 40503 + 12345) ^ (a << 11));
    return m;
  endfunction
  localparam logic [DEPTH-1:0][W-1:0] GEN = gen_content();

  logic [R-1:0] t;
  logic fetch;
  cm_word_t word, word2;
  int checks = 0, failures = 0;

  cmcu_control_memory dut (.t, .fetch, .word);
  cmcu_control_memory #(.CONTENT(GEN)) dut2 (.t, .fetch, .word(word2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 32; a++) begin
      t = 5'(a); fetch = 1; #1;
      checks += 5;
      if (word.y0  !== ref_y0(a)) begin failures++; $display("a=%0d y0=%b", a, word.y0); end
      if (word.y_e !== ref_ye(a)) begin failures++; $display("a=%0d yE=%b", a, word.y_e); end
      if (word.v[0] !== ref_v1(a)) begin failures++; $display("a=%0d v1=%b", a, word.v); end
      if (word.y !== '0) failures++;
      if (word2 !== cm_word_t'(W'((a * 40503 + 12345) ^ (a << 11)))) begin
        failures++; $display("a=%0d generated word %h", a, word2);
      end
      fetch = 0; #1;
      checks += 2;
      if (word !== '0) failures++;
      if (word2 !== '0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
