// tb_crc16: self-checking testbench of the CRC16 unit.
//
// Checks the standard check value (CRC-16 of ASCII "123456789" = 0x906E for
// this polynomial, preset and complement), a bit-by-bit reference model on
// random byte strings, and that a frame followed by its own CRC (low byte
// first) leaves the fixed residue 0xF0B8 in the register (crc_o = 0x0F47).
`timescale 1ns/1ps
module tb_crc16;
  logic clk = 0, rst_n = 0, init = 0, en = 0;
  logic [7:0] data = 0;
  logic [15:0] crc_o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  crc16 dut (.*);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // bit-serial reference, LSB first
  function automatic logic [15:0] ref_crc(input logic [7:0] b[$]);
    logic [15:0] r;
    r = 16'hFFFF;
    foreach (b[i])
      for (int k = 0; k < 8; k++) begin
        logic fb;
        fb = r[0] ^ b[i][k];
        r  = r >> 1;
        if (fb) r = r ^ 16'h8408;
      end
    return ~r;
  endfunction

  task automatic feed(input logic [7:0] b[$]);
    @(negedge clk); init = 1;
    @(negedge clk); init = 0;
    foreach (b[i]) begin
      en = 1; data = b[i];
      @(negedge clk);
    end
    en = 0;
  endtask

  initial begin
    logic [7:0] s[$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    s = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    feed(s);
    check(crc_o == 16'h906E, $sformatf("check value %04h", crc_o));
    for (int n = 0; n < 40; n++) begin
      logic [15:0] c;
      s.delete();
      for (int i = 0; i < 1 + n % 20; i++) s.push_back(8'($urandom));
      feed(s);
      c = crc_o;
      check(c == ref_crc(s), $sformatf("random string %0d: %04h vs %04h", n, c, ref_crc(s)));
      s.push_back(c[7:0]);
      s.push_back(c[15:8]);
      feed(s);
      check(crc_o == 16'h0F47, $sformatf("residue %04h", crc_o));
    end
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
