// tb_data_flow: self-checking testbench of the data flow (command) module.
//
// The data flow runs with the real memory controller, EEPROM controller,
// EEPROM model (short write times) and random generator; requests are placed
// straight into its request buffer and responses read from its response
// buffer, so the air interface is not involved. A model of the external
// secure function supplies TF, RF and the signed CRC. Checked: inventory
// (one slot, mask, 16 slots with slot markers, AFI / EAS alarm), the
// ready / selected / quiet states, read / write / lock block with access and
// lock errors, write AFI and EAS, both authentication steps (pass and fail),
// the secure read / write with signed CRC for a user key and for the super
// key (all user areas; a signature with the wrong key is refused), the
// read-size limit, dropped requests, the response CRC and the reply delay t1.
`timescale 1ns/1ps
module tb_data_flow;
  import rfid_pkg::*;
  localparam int RXBUF = 32, TXBUF = 48, T1 = 4352;
  localparam logic [63:0] UID = 64'hE004_0100_1234_5678;
  localparam logic [47:0] KEY_U0 = 48'hA0A0_0000_0010;
  localparam logic [47:0] KEY_SU = 48'h5EC0_0000_0001;
  localparam logic [7:0]  EAS = 8'hEA;

  logic clk = 0, rst_n = 0;
  logic rx_valid = 0, rx_crc_ok = 0;
  logic [7:0] rx_len = 0;
  logic [7:0] rx_buf [RXBUF];
  logic [15:0] rx_crc_calc = 0, rx_crc_rcv = 0;
  logic tx_start, tx_dual, tx_fast, tx_busy = 0;
  logic [7:0] tx_len;
  logic [7:0] tx_buf [TXBUF];
  logic mem_valid, mem_ack, mem_err, boot_done, afi_lock;
  mem_req_t mem_req;
  word_t mem_rdata;
  logic [63:0] uid, lock_bits;
  logic [7:0] afi, dsfid;
  logic rnd_req, rnd_valid;
  logic [47:0] rnd, sf_key, sf_trn, sf_rrn, sf_tf, sf_rf;
  logic [15:0] sf_crc, sf_sig;
  tag_state_e tag_state;
  auth_e auth_level;
  logic eas_armed, ev_resp, ev_drop;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #37 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  data_flow #(.RXBUF(RXBUF), .TXBUF(TXBUF), .T1_CYCLES(T1), .EAS_AFI(EAS)) dut (.*);

  logic ee_start, ee_done, hv_en, hv_ok, erase, prog, read_en;
  ee_op_e ee_op;
  blk_t ee_addr, row;
  word_t ee_wdata, ee_rdata, din, dout;
  mem_ctrl u_mem (.clk, .rst_n, .req_valid(mem_valid), .req(mem_req), .ack(mem_ack), .err(mem_err),
    .rdata(mem_rdata), .boot_done, .uid, .afi, .dsfid, .afi_lock, .lock_bits,
    .ee_start, .ee_op, .ee_addr, .ee_wdata, .ee_done, .ee_rdata);
  eeprom_ctrl #(.T_PULSE(40)) u_eec (.clk, .rst_n, .start(ee_start), .op(ee_op), .addr(ee_addr),
    .wdata(ee_wdata), .busy(), .done(ee_done), .rdata(ee_rdata),
    .hv_en, .hv_ok, .row, .din, .erase, .prog, .read_en, .dout);
  eeprom_array #(.HV_RAMP(8), .MIN_PULSE(40), .INIT_UID(UID), .USER_KEY0(KEY_U0)) u_arr (.*);
  rng48 u_rng (.clk, .rst_n, .entropy_i(1'b0), .req(rnd_req), .rnd_o(rnd), .rnd_valid);

  // external secure function model
  function automatic logic [47:0] f_tf(input logic [47:0] t, input logic [47:0] r, input logic [47:0] k);
    return t ^ {r[23:0], r[47:24]} ^ k;
  endfunction
  function automatic logic [47:0] f_rf(input logic [47:0] t, input logic [47:0] r, input logic [47:0] k);
    return ~(r ^ {t[15:0], t[47:16]}) ^ k;
  endfunction
  function automatic logic [15:0] f_sig(input logic [15:0] c, input logic [47:0] k);
    return c ^ k[15:0] ^ k[47:32] ^ 16'h5A5A;
  endfunction
  assign sf_tf  = f_tf(sf_trn, sf_rrn, sf_key);
  assign sf_rf  = f_rf(sf_trn, sf_rrn, sf_key);
  assign sf_sig = f_sig(sf_crc, sf_key);

  // responses
  logic [7:0] rsp[$];
  longint t_rx, t_tx;
  int n_resp = 0;
  always @(posedge clk) begin
    if (tx_start) begin
      rsp.delete();
      for (int i = 0; i < tx_len; i++) rsp.push_back(tx_buf[i]);
      t_tx = cyc;
      n_resp++;
    end
    tx_busy <= tx_start ? 1'b1 : (tx_busy && ($urandom_range(0, 20) != 0));
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [15:0] crc(input logic [7:0] b[$]);
    logic [15:0] r;
    r = 16'hFFFF;
    foreach (b[i]) r = crc16_byte(r, b[i]);
    return ~r;
  endfunction

  // send a request; returns the response (empty when none came)
  task automatic req(input logic [7:0] d[$], output logic [7:0] r[$], input bit signed_crc = 0,
                     input bit corrupt = 0, input logic [47:0] key = KEY_U0);
    logic [15:0] c, s;
    int n0;
    c = crc(d);
    s = signed_crc ? f_sig(c, key) : c;
    if (corrupt) s = ~s;
    @(negedge clk);
    foreach (d[i]) rx_buf[i] = d[i];
    rx_buf[d.size()] = s[7:0];
    rx_buf[d.size() + 1] = s[15:8];
    rx_len = (d.size() == 0) ? 8'd0 : 8'(d.size() + 2);
    rx_crc_calc = c; rx_crc_rcv = s; rx_crc_ok = (c == s);
    rx_valid = 1;
    n0 = n_resp;
    t_rx = cyc;
    @(negedge clk); rx_valid = 0;
    while (n_resp == n0 && cyc < t_rx + T1 + 3000) @(negedge clk);
    r.delete();
    if (n_resp != n0) begin
      logic [7:0] body[$];
      logic [15:0] rc;
      r = rsp;
      check(t_tx - t_rx >= T1 && t_tx - t_rx <= T1 + 2500, $sformatf("reply delay %0d", t_tx - t_rx));
      body = r[0:r.size()-3];
      rc = crc(body);
      if (signed_crc) rc = f_sig(rc, key);
      check({r[$], r[$-1]} == rc, $sformatf("response CRC %02h%02h vs %04h", r[$], r[$-1], rc));
      r = body;
    end
    while (tx_busy) @(negedge clk);
    repeat (5) @(negedge clk);
  endtask

  function automatic logic [7:0] uidb(input int i);
    return UID[8*i +: 8];
  endfunction

  initial begin
    logic [7:0] d[$], r[$];
    logic [47:0] trn, rrn;
    int nd;
    for (int i = 0; i < RXBUF; i++) rx_buf[i] = '0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    wait (boot_done);
    repeat (3) @(negedge clk);

    // inventory, one slot, no mask
    d = '{8'h26, 8'h01, 8'h00};
    req(d, r);
    check(r.size() == 10 && r[0] == 8'h00, $sformatf("inventory response size %0d", r.size()));
    for (int i = 0; i < 8; i++) if (r.size() == 10) check(r[2+i] == uidb(i), $sformatf("inventory UID byte %0d", i));
    // inventory with matching / non-matching 8-bit mask
    d = '{8'h26, 8'h01, 8'h08, 8'h78};
    req(d, r);
    check(r.size() == 10, "mask match answered");
    d = '{8'h26, 8'h01, 8'h08, 8'h79};
    nd = 0; req(d, r);
    check(r.size() == 0, "mask mismatch silent");
    // 16 slots, 4-bit mask 0x8: slot = UID bits 7..4 = 7
    d = '{8'h06, 8'h01, 8'h04, 8'h08};
    req(d, r);
    check(r.size() == 0, "16 slots: not slot 0");
    for (int s = 1; s <= 7; s++) begin
      logic [7:0] none[$];
      req(none, r);
      check((s == 7) == (r.size() == 10), $sformatf("slot %0d answer %0d", s, r.size()));
    end
    // read multiple blocks 0..1 = UID
    d = '{8'h02, 8'h23, 8'h00, 8'h01};
    req(d, r);
    check(r.size() == 9 && r[0] == 0, "read UID blocks");
    for (int i = 0; i < 8; i++) if (r.size() == 9) check(r[1+i] == uidb(i), $sformatf("read UID byte %0d", i));
    // write / read free block 50
    d = '{8'h02, 8'h21, 8'd50, 8'h11, 8'h22, 8'h33, 8'h44};
    req(d, r);
    check(r.size() == 1 && r[0] == 0, "write block ok");
    d = '{8'h42, 8'h23, 8'd50, 8'h00};   // option flag: lock status byte
    req(d, r);
    check(r.size() == 6 && r[1] == 0 && r[2] == 8'h11 && r[5] == 8'h44, "read back with lock status");
    // write to a protected area without authentication
    d = '{8'h02, 8'h21, 8'd20, 8'h01, 8'h02, 8'h03, 8'h04};
    req(d, r);
    check(r.size() == 2 && r[0] == 1 && r[1] == ERR_ACCESS, "protected write refused");
    // lock block 50, then writing it fails
    d = '{8'h02, 8'h22, 8'd50};
    req(d, r);
    check(r.size() == 1 && r[0] == 0 && lock_bits[50], "lock block");
    d = '{8'h02, 8'h21, 8'd50, 8'h55, 8'h55, 8'h55, 8'h55};
    req(d, r);
    check(r.size() == 2 && r[1] == ERR_LOCKED, "locked block write refused");
    d = '{8'h42, 8'h23, 8'd50, 8'h00};
    req(d, r);
    check(r.size() == 6 && r[1] == 1 && r[2] == 8'h11, "locked block unchanged, lock status 1");
    // EAS via AFI
    d = '{8'h02, 8'h27, EAS};
    req(d, r);
    check(r.size() == 1 && eas_armed, "set EAS");
    d = '{8'h36, 8'h01, EAS, 8'h00};    // EAS alarm inventory (AFI flag)
    req(d, r);
    check(r.size() == 10, "EAS alarm answered");
    d = '{8'h02, 8'h27, 8'h00};
    req(d, r);
    check(r.size() == 1 && !eas_armed, "reset EAS");
    d = '{8'h36, 8'h01, EAS, 8'h00};
    req(d, r);
    check(r.size() == 0, "no EAS alarm after reset");
    // select / stay quiet / reset to ready
    d = '{8'h22, 8'h25, uidb(0), uidb(1), uidb(2), uidb(3), uidb(4), uidb(5), uidb(6), uidb(7)};
    req(d, r);
    check(r.size() == 1 && tag_state == ST_SELECTED, "select");
    d = '{8'h12, 8'h23, 8'd44, 8'h00};   // select flag: only the selected tag answers
    req(d, r);
    check(r.size() == 5, "selected-mode read");
    d = '{8'h22, 8'h02, uidb(0), uidb(1), uidb(2), uidb(3), uidb(4), uidb(5), uidb(6), 8'h00};
    req(d, r);
    check(r.size() == 0 && tag_state == ST_SELECTED, "other UID ignored");
    d = '{8'h22, 8'h02, uidb(0), uidb(1), uidb(2), uidb(3), uidb(4), uidb(5), uidb(6), uidb(7)};
    req(d, r);
    check(r.size() == 0 && tag_state == ST_QUIET, "stay quiet");
    d = '{8'h26, 8'h01, 8'h00};
    req(d, r);
    check(r.size() == 0, "quiet tag skips inventory");
    d = '{8'h22, 8'h26, uidb(0), uidb(1), uidb(2), uidb(3), uidb(4), uidb(5), uidb(6), uidb(7)};
    req(d, r);
    check(r.size() == 1 && tag_state == ST_READY, "reset to ready");
    // authentication with user key 0
    d = '{8'h02, 8'hF0, 8'h01};
    req(d, r);
    check(r.size() == 7 && r[0] == 0, "authentication 1 answers TRN");
    for (int i = 0; i < 6; i++) trn[8*i +: 8] = (r.size() == 7) ? r[1+i] : 8'h00;
    rrn = {$urandom, $urandom};
    begin
      logic [47:0] tf, rf;
      tf = f_tf(trn, rrn, KEY_U0);
      rf = f_rf(trn, rrn, KEY_U0);
      d = '{8'h02, 8'hF1};
      for (int i = 0; i < 6; i++) d.push_back(rrn[8*i +: 8]);
      for (int i = 0; i < 6; i++) d.push_back(tf[8*i +: 8]);
      req(d, r);
      check(r.size() == 7 && r[0] == 0 && auth_level == AUTH_USER0, "authentication 2 passes");
      for (int i = 0; i < 6; i++) if (r.size() == 7) check(r[1+i] == rf[8*i +: 8], "RF' returned");
    end
    // secure write / read in user area 0, signed CRC
    d = '{8'h02, 8'hF2, 8'd21, 8'hC1, 8'hC2, 8'hC3, 8'hC4};
    req(d, r, 1);
    check(r.size() == 1 && r[0] == 0, "write secure");
    d = '{8'h02, 8'hF3, 8'd21, 8'h00};
    req(d, r, 1);
    check(r.size() == 5 && r[1] == 8'hC1 && r[4] == 8'hC4, "read multi secure");
    d = '{8'h02, 8'hF3, 8'd28, 8'h00};
    req(d, r, 1);
    check(r.size() == 2 && r[1] == ERR_ACCESS, "other user area refused");
    d = '{8'h02, 8'hF3, 8'd21, 8'h00};
    req(d, r, 0);
    check(r.size() == 0, "secure read with plain CRC dropped");
    // plain read of the protected block is refused
    d = '{8'h02, 8'h23, 8'd21, 8'h00};
    req(d, r);
    check(r.size() == 2 && r[1] == ERR_ACCESS, "plain read of protected block refused");
    // wrong TF
    d = '{8'h02, 8'hF0, 8'h01};
    req(d, r);
    d = '{8'h02, 8'hF1};
    for (int i = 0; i < 12; i++) d.push_back(8'(i));
    req(d, r);
    check(r.size() == 2 && r[0] == 1 && auth_level == AUTH_NONE, "wrong TF refused");
    // super key: all user areas, the keys, but not with a user key's signature
    d = '{8'h02, 8'hF0, 8'h00};
    req(d, r);
    for (int i = 0; i < 6; i++) trn[8*i +: 8] = (r.size() == 7) ? r[1+i] : 8'h00;
    rrn = {$urandom, $urandom};
    begin
      logic [47:0] tf;
      tf = f_tf(trn, rrn, KEY_SU);
      d = '{8'h02, 8'hF1};
      for (int i = 0; i < 6; i++) d.push_back(rrn[8*i +: 8]);
      for (int i = 0; i < 6; i++) d.push_back(tf[8*i +: 8]);
      req(d, r);
      check(r.size() == 7 && auth_level == AUTH_SUPER, "super key authentication");
    end
    d = '{8'h02, 8'hF3, 8'd21, 8'h00};
    req(d, r, 1, 0, KEY_SU);
    check(r.size() == 5 && r[1] == 8'hC1, "super key reads user area 0");
    d = '{8'h02, 8'hF2, 8'd36, 8'h36, 8'h37, 8'h38, 8'h39};
    req(d, r, 1, 0, KEY_SU);
    check(r.size() == 1 && r[0] == 0, "super key writes user area 2");
    d = '{8'h02, 8'hF3, 8'd35, 8'h01};   // blocks 35 (area 1) and 36 (area 2)
    req(d, r, 1, 0, KEY_SU);
    check(r.size() == 9 && r[5] == 8'h36 && r[8] == 8'h39, "super key reads across areas");
    d = '{8'h02, 8'hF3, 8'd21, 8'h00};
    req(d, r, 1, 0, KEY_U0);
    check(r.size() == 0, "user key signature refused under the super key");
    // read limit: 9 blocks is too many
    d = '{8'h02, 8'h23, 8'd44, 8'd8};
    req(d, r);
    check(r.size() == 2 && r[0] == 1 && r[1] == ERR_NOT_AVAIL, "read of 9 blocks refused");
    d = '{8'h02, 8'h23, 8'd56, 8'd7};
    req(d, r);
    check(r.size() == 33 && r[0] == 0, "read of 8 blocks");
    // corrupted CRC and unsupported command are dropped
    d = '{8'h02, 8'h23, 8'd44, 8'h00};
    req(d, r, 0, 1);
    check(r.size() == 0, "bad CRC dropped");
    d = '{8'h02, 8'h2B};
    req(d, r);
    check(r.size() == 0, "unsupported command dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
