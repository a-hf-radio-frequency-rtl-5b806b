// tb_clk_gen: self-checking testbench of the clock generator.
//
// Checks that ce_sample is high exactly one clk in four (sample clock =
// 13.56 MHz / 4, 32 samples per 9.44 us), evenly spaced, and that ce_rx
// follows it only while the carrier is present.
`timescale 1ns/1ps
module tb_clk_gen;
  logic clk = 0, rst_n = 0, carrier_i = 1;
  logic ce_sample, ce_rx;
  int checks = 0, failures = 0;

  always #37 clk = ~clk;
  clk_gen dut (.*);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int n, last, gaps_bad, nrx;
    repeat (3) @(negedge clk);
    rst_n = 1;
    n = 0; last = -1; gaps_bad = 0;
    for (int t = 0; t < 4000; t++) begin
      @(posedge clk); #1;
      if (ce_sample) begin
        if (last >= 0 && t - last != 4) gaps_bad++;
        last = t; n++;
      end
    end
    check(n >= 999 && n <= 1000, $sformatf("%0d sample enables in 4000 clk", n));
    check(gaps_bad == 0, "enables evenly spaced by 4");
    // 128 clk (9.44 us) = 32 samples
    n = 0;
    repeat (128) begin @(posedge clk); #1; if (ce_sample) n++; end
    check(n == 32, $sformatf("%0d samples in 9.44 us", n));
    // no clock for the counter during a pause
    carrier_i = 0; nrx = 0;
    repeat (200) begin @(posedge clk); #1; if (ce_rx) nrx++; end
    check(nrx == 0, "ce_rx off during modulation");
    carrier_i = 1; nrx = 0; n = 0;
    repeat (200) begin @(posedge clk); #1; if (ce_rx) nrx++; if (ce_sample) n++; end
    check(nrx == n && n == 50, $sformatf("ce_rx follows ce_sample (%0d/%0d)", nrx, n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
