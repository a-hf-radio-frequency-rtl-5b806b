// tb_data_process: self-checking testbench of the data process module.
//
// A reader model sends requests in both codings, with analog edge delays;
// the testbench checks the request buffer, its length, the CRC verdict and
// the computed and received CRC values, and that a corrupted request is
// flagged. Responses placed in the transmit buffer are sent with each
// subcarrier mode and data rate and decoded back by the reader model.
`timescale 1ns/1ps
module tb_data_process;
  localparam int RXBUF = 32, TXBUF = 48;
  logic clk = 0, rst_n = 0;
  logic ce_sample, ce_rx, carrier;
  logic rx_valid, rx_err, rx_crc_ok, tx_busy, mod_o, ev_corr, ev_late, rx_mode256;
  logic [7:0] rx_len;
  logic [7:0] rx_buf [RXBUF];
  logic [15:0] rx_crc_calc, rx_crc_rcv;
  logic tx_start = 0, tx_dual = 0, tx_fast = 1;
  logic [7:0] tx_len = 0;
  logic [7:0] tx_buf [TXBUF];
  int checks = 0, failures = 0;
  int n_valid = 0, n_err = 0;

  always #37 clk = ~clk;
  logic [1:0] dv = 0;
  always_ff @(posedge clk) dv <= dv + 1;
  assign ce_sample = (dv == 2'd3);
  assign ce_rx = ce_sample & carrier;

  data_process #(.RXBUF(RXBUF), .TXBUF(TXBUF)) dut (.*, .carrier_i(carrier));
  rfid_reader rdr (.clk, .carrier, .mod(mod_o));

  always_ff @(posedge clk) begin
    if (rx_valid) n_valid++;
    if (rx_err)   n_err++;
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic rx_test(input string name, input logic [7:0] d[$], input bit m256);
    int v0;
    logic [15:0] c;
    v0 = n_valid;
    rdr.send(d, m256, 1'b1);
    repeat ((m256 ? 2 * 65536 : 2048) + 2000) @(posedge clk);
    c = rdr.crc16(d);
    check(n_valid == v0 + 1, {name, ": rx_valid"});
    check(rx_len == 8'(d.size() + 2), $sformatf("%s: length %0d", name, rx_len));
    foreach (d[i]) check(rx_buf[i] == d[i], $sformatf("%s: byte %0d", name, i));
    check(rx_crc_ok, {name, ": CRC ok"});
    check(rx_crc_calc == c && rx_crc_rcv == c, $sformatf("%s: CRC %04h/%04h vs %04h", name, rx_crc_calc, rx_crc_rcv, c));
    check(rx_mode256 == m256, {name, ": coding"});
  endtask

  task automatic tx_test(input bit dual, input bit fast, input int n);
    logic [7:0] got[$];
    logic [7:0] exp[$];
    bit ok;
    longint ts;
    for (int i = 0; i < n; i++) begin
      tx_buf[i] = 8'($urandom);
      exp.push_back(tx_buf[i]);
    end
    @(negedge clk);
    tx_len = 8'(n); tx_dual = dual; tx_fast = fast; tx_start = 1;
    @(negedge clk); tx_start = 0;
    rdr.receive(got, ok, ts, dual, fast, 10000);
    check(ok, $sformatf("tx dual=%0d fast=%0d decoded", dual, fast));
    check(got.size() == n, $sformatf("tx dual=%0d fast=%0d: %0d bytes", dual, fast, got.size()));
    foreach (exp[i]) if (i < got.size()) check(got[i] == exp[i], $sformatf("tx byte %0d %02h vs %02h", i, got[i], exp[i]));
    check(!tx_busy, "tx done");
  endtask

  initial begin
    logic [7:0] d[$];
    for (int i = 0; i < TXBUF; i++) tx_buf[i] = '0;
    repeat (10) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    d = '{8'h26, 8'h01, 8'h00};
    rx_test("inventory 1/4", d, 0);
    d = '{8'h22, 8'h20, 8'h78, 8'h56, 8'h34, 8'h12, 8'h00, 8'h01, 8'h04, 8'hE0, 8'h2C, 8'h05};
    rx_test("addressed 1/4", d, 0);
    d = '{8'h02, 8'h23, 8'hFF};
    rx_test("1/256", d, 1);
    // corrupted CRC
    begin
      int v0;
      d = '{8'h02, 8'h20, 8'h2C, 8'h00, 8'h00};
      v0 = n_valid;
      rdr.send(d, 0, 1'b1, 1'b0);
      repeat (4000) @(posedge clk);
      check(n_valid == v0 + 1 && !rx_crc_ok, "bad CRC flagged");
    end
    tx_test(0, 1, 10);
    tx_test(1, 1, 5);
    tx_test(0, 0, 3);
    tx_test(1, 0, 2);
    check(n_err == 0, "no timing failures");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #300ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
