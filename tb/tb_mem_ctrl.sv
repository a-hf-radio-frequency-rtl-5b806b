// tb_mem_ctrl: self-checking testbench of the memory controller.
//
// The memory controller runs over the EEPROM controller and the array model
// (short times). Checks: the boot load copies UID, configuration and lock
// bits; a write (erase + program) and read-back; the configuration and lock
// copies follow writes to their blocks; a write to a locked block is refused
// and leaves the array unchanged.
`timescale 1ns/1ps
module tb_mem_ctrl;
  import rfid_pkg::*;
  logic clk = 0, rst_n = 0, req_valid = 0;
  mem_req_t req = '0;
  logic ack, err, boot_done, afi_lock;
  word_t rdata;
  logic [63:0] uid, lock_bits;
  logic [7:0] afi, dsfid;
  logic ee_start, ee_done;
  ee_op_e ee_op;
  blk_t ee_addr, row;
  word_t ee_wdata, ee_rdata, din, dout;
  logic hv_en, hv_ok, erase, prog, read_en;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  mem_ctrl dut (.*);
  eeprom_ctrl #(.T_PULSE(20), .T_SENSE(3)) ctl (
    .clk, .rst_n, .start(ee_start), .op(ee_op), .addr(ee_addr), .wdata(ee_wdata),
    .busy(), .done(ee_done), .rdata(ee_rdata),
    .hv_en, .hv_ok, .row, .din, .erase, .prog, .read_en, .dout);
  eeprom_array #(.HV_RAMP(5), .MIN_PULSE(20), .T_SENSE(3),
                 .INIT_UID(64'hE004_0102_0304_0506)) arr (.*);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic access(input logic we, input int a, input word_t d, output word_t r, output logic e);
    @(negedge clk); req_valid = 1; req.we = we; req.addr = blk_t'(a); req.wdata = d;
    while (!ack) @(posedge clk);
    r = rdata; e = err;
    @(negedge clk); req_valid = 0;
  endtask

  initial begin
    word_t r; logic e;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (boot_done);
    check(uid == 64'hE004_0102_0304_0506, $sformatf("UID copy %016h", uid));
    check(afi == 0 && lock_bits == 0, "config and lock copies");
    access(1, 50, 32'hAABB_CCDD, r, e);
    check(!e, "write accepted");
    access(0, 50, 0, r, e);
    check(r == 32'hAABB_CCDD, $sformatf("read back %08h", r));
    access(1, BLK_CONFIG, 32'h0001_2A07, r, e);
    check(afi == 8'h07 && dsfid == 8'h2A && afi_lock, "config copy follows write");
    access(1, BLK_LOCK1, 32'h0004_0000, r, e);   // lock block 50
    check(lock_bits[50] && lock_bits[49:0] == 0, "lock copy follows write");
    access(1, 50, 32'h1111_1111, r, e);
    check(e, "write to locked block refused");
    access(0, 50, 0, r, e);
    check(r == 32'hAABB_CCDD && !e, $sformatf("locked block unchanged %08h", r));
    access(0, 6, 0, r, e);
    check(r == 32'h0000_0001, $sformatf("key block read %08h", r));
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
