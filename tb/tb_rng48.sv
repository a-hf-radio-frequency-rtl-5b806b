// tb_rng48: self-checking testbench of the 48-bit random number generator.
//
// With the field input held still the register must follow the stated
// LFSR recurrence exactly (an independent model is stepped in parallel).
// Numbers drawn at spaced times must all differ, and a change of the field
// input must alter the sequence.
`timescale 1ns/1ps
module tb_rng48;
  logic clk = 0, rst_n = 0, entropy_i = 0, req = 0;
  logic [47:0] rnd_o;
  logic rnd_valid;
  int checks = 0, failures = 0;
  logic [47:0] model;
  logic [47:0] seen[$];

  always #5 clk = ~clk;
  rng48 dut (.*);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [47:0] step(input logic [47:0] l);
    return {l[46:0], l[47] ^ l[46] ^ l[20] ^ l[19]};
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    model = 48'hACE1_2468_9BDF;
    for (int n = 0; n < 30; n++) begin
      int gap;
      gap = 1 + $urandom_range(0, 40);
      repeat (gap) begin @(negedge clk); model = step(model); end
      req = 1;
      @(negedge clk); req = 0;
      check(rnd_valid, "rnd_valid after req");
      check(rnd_o == model, $sformatf("draw %0d: %012h vs model %012h", n, rnd_o, model));
      model = step(model);
      foreach (seen[i]) check(seen[i] != rnd_o, "numbers differ");
      seen.push_back(rnd_o);
    end
    // field edges change the sequence
    @(negedge clk); entropy_i = 1;
    repeat (2) begin @(negedge clk); model = step(model); end
    req = 1; @(negedge clk); req = 0;
    check(rnd_o != model, "field edge mixed in");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
