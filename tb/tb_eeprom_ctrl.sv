// tb_eeprom_ctrl: self-checking testbench of the EEPROM controller.
//
// The controller drives the EEPROM array model (short ramp and pulse times).
// Checks: a read returns the initial word within T_SENSE + 3 cycles; erase
// then program writes a word; the erase/program pulse lasts T_PULSE + 1
// cycles with the pump up and the row held; busy/done behave.
`timescale 1ns/1ps
module tb_eeprom_ctrl;
  import rfid_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  ee_op_e op = EE_READ;
  blk_t addr = '0;
  word_t wdata = '0, rdata, din, dout;
  logic busy, done, hv_en, hv_ok, erase, prog, read_en;
  blk_t row;
  int checks = 0, failures = 0;
  int pulse_len = 0, max_pulse = 0, bad_hv = 0;
  localparam int TP = 30, TS = 4;

  always #5 clk = ~clk;
  eeprom_ctrl #(.T_PULSE(TP), .T_SENSE(TS)) dut (.*);
  eeprom_array #(.HV_RAMP(7), .MIN_PULSE(TP), .T_SENSE(TS),
                 .INIT_UID(64'hCAFE_0000_1111_2222)) arr (.*);

  always @(posedge clk) begin
    if (rst_n && (erase || prog)) begin
      pulse_len <= pulse_len + 1;
      if (!hv_ok) bad_hv <= bad_hv + 1;
    end else begin
      if (pulse_len > 0) max_pulse <= pulse_len;
      pulse_len <= 0;
    end
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic do_op(input ee_op_e o, input int a, input word_t d, output int cyc);
    @(negedge clk); op = o; addr = blk_t'(a); wdata = d; start = 1;
    @(negedge clk); start = 0; cyc = 1;
    check(busy, "busy after start");
    while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    int c;
    repeat (3) @(negedge clk);
    rst_n = 1;
    do_op(EE_READ, 1, 0, c);
    check(rdata == 32'hCAFE_0000, $sformatf("read %08h", rdata));
    check(c <= TS + 3, $sformatf("read took %0d cycles", c));
    do_op(EE_ERASE, 40, 0, c);
    check(max_pulse == TP + 1, $sformatf("erase pulse %0d cycles", max_pulse));
    do_op(EE_PROG, 40, 32'h600D_F00D, c);
    check(max_pulse == TP + 1, $sformatf("program pulse %0d cycles", max_pulse));
    check(!hv_en, "pump off after program");
    do_op(EE_READ, 40, 0, c);
    check(rdata == 32'h600D_F00D, $sformatf("read back %08h", rdata));
    do_op(EE_ERASE, 40, 0, c);
    do_op(EE_READ, 40, 0, c);
    check(rdata == 32'h0, $sformatf("erased %08h", rdata));
    check(bad_hv == 0, "pulses only with high voltage");
    check(!busy, "idle at end");
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
