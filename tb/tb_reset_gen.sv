// tb_reset_gen: self-checking testbench of the power-on reset generator.
//
// Checks that rst_n is low while power is not good, that it rises exactly
// 2 + HOLD_CYCLES clock edges after por_n rises, that a power dip resets at
// once (without a clock edge) and that a second power-up repeats the delay.
`timescale 1ns/1ps
module tb_reset_gen;
  logic clk = 0, por_n = 0, rst_n;
  int checks = 0, failures = 0;
  localparam int HOLD = 16;

  always #5 clk = ~clk;
  reset_gen #(.HOLD_CYCLES(HOLD)) dut (.*);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic power_up();
    int n;
    @(negedge clk); por_n = 1;
    n = 0;
    while (!rst_n && n < 100) begin @(posedge clk); #1; n++; end
    check(n == 2 + HOLD + 1, $sformatf("reset released after %0d edges", n));
  endtask

  initial begin
    repeat (5) @(posedge clk);
    #1 check(!rst_n, "reset while no power");
    power_up();
    repeat (10) @(posedge clk);
    #1 check(rst_n, "stays out of reset");
    #2 por_n = 0;
    #1 check(!rst_n, "asynchronous reset on power loss");
    repeat (4) @(posedge clk);
    power_up();
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
