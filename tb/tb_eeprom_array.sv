// tb_eeprom_array: self-checking testbench of the EEPROM array model.
//
// Drives the analog-driver pins directly with short timing parameters and
// checks the initial contents (UID and keys), the sense delay of a read,
// erase to zero, programming that only sets bits, and that a pulse that is
// too short or lacks high voltage leaves the cell unchanged.
`timescale 1ns/1ps
module tb_eeprom_array;
  import rfid_pkg::*;
  logic clk = 0, hv_en = 0, erase = 0, prog = 0, read_en = 0, hv_ok;
  blk_t row = '0;
  word_t din = '0, dout;
  int checks = 0, failures = 0;
  localparam int RAMP = 10, PULSE = 20, SENSE = 3;

  always #5 clk = ~clk;
  eeprom_array #(.HV_RAMP(RAMP), .MIN_PULSE(PULSE), .T_SENSE(SENSE),
                 .INIT_UID(64'h0123_4567_89AB_CDEF)) dut (.*);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic rd(input int r, output word_t w, output int lat);
    @(negedge clk); row = blk_t'(r); read_en = 1; lat = 0;
    while (dout == '0 && lat < 20) begin @(negedge clk); lat++; end
    w = dout;
    @(negedge clk); read_en = 0;
  endtask

  task automatic pulse(input int r, input word_t d, input bit er, input int len, input bit hv);
    @(negedge clk); row = blk_t'(r); din = d; hv_en = hv;
    if (hv) while (!hv_ok) @(negedge clk);
    if (er) erase = 1; else prog = 1;
    repeat (len) @(negedge clk);
    erase = 0; prog = 0;
    @(negedge clk); hv_en = 0;
  endtask

  initial begin
    word_t w; int lat;
    repeat (2) @(negedge clk);
    rd(0, w, lat);
    check(w == 32'h89AB_CDEF, $sformatf("UID low %08h", w));
    check(lat == SENSE, $sformatf("read latency %0d", lat));
    rd(1, w, lat);
    check(w == 32'h0123_4567, $sformatf("UID high %08h", w));
    rd(6, w, lat);
    check(w == 32'h0000_0001, $sformatf("super key low %08h", w));
    pulse(50, 32'hDEAD_BEEF, 0, PULSE + 2, 1);
    rd(50, w, lat);
    check(w == 32'hDEAD_BEEF, $sformatf("programmed %08h", w));
    pulse(50, 32'h0000_0010, 0, PULSE + 2, 1);
    rd(50, w, lat);
    check(w == 32'hDEAD_BEFF, $sformatf("program only sets bits %08h", w));
    pulse(50, 32'h0, 1, PULSE - 5, 1);
    rd(50, w, lat);
    check(w == 32'hDEAD_BEFF, "short erase pulse has no effect");
    pulse(50, 32'h0, 1, PULSE + 2, 0);
    rd(50, w, lat);
    check(w == 32'hDEAD_BEFF, "erase without high voltage has no effect");
    pulse(50, 32'h0, 1, PULSE + 2, 1);
    pulse(50, 32'h1234_5678, 0, PULSE + 2, 1);
    rd(50, w, lat);
    check(w == 32'h1234_5678, $sformatf("erase then program %08h", w));
    rd(51, w, lat);
    check(w == 32'h0, "neighbour untouched");
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
