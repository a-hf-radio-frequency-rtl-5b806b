// tb_rfid_tag_top: end-to-end testbench of the whole tag controller, with
// every parameter of the top at its default (real EEPROM times, real reply
// delay).
//
// A reader model talks to the tag over the air-interface signals only
// (carrier in, load modulation out), with random analog edge delays on the
// pauses, and decodes every response. A model of the external secure
// function supplies TF, RF and the signed CRC. The run goes through: power-on
// and boot load, one-slot inventory, 16-slot inventory with slot markers,
// select / stay quiet / reset to ready, 1/256 coded requests, a response at
// the low data rate and with two subcarriers, write / lock / read of EEPROM
// blocks, EAS set and the EAS alarm inventory, the two authentication steps
// and a secure write / read with signed CRC, a refused access, a request with
// a bad CRC, an unsupported command and a request broken by an extra pause.
// Each response's CRC and content are checked, and its start is checked
// against the reply delay t1 = 4352 clk after the request.
// Mechanisms counted, each of which must happen at least once: detection
// counter corrections, late last-slot recoveries, responses, dropped
// requests, timing failures, both request codings, both subcarrier modes,
// both data rates, a 16-slot inventory answer, a passed authentication,
// EEPROM writes and the EAS alarm.
`timescale 1ns/1ps
module tb_rfid_tag_top;
  localparam int T1 = 4352;
  localparam logic [63:0] UID = 64'hE004_0100_1234_5678;   // top's default
  localparam logic [47:0] KEY_U0 = 48'hA0A0_0000_0010;     // EEPROM model's default
  localparam logic [7:0]  EAS = 8'hEA;

  logic clk = 0, por_n = 0, carrier, brk = 1'b1, mod;
  logic [47:0] sf_key, sf_trn, sf_rrn, sf_tf, sf_rf;
  logic [15:0] sf_crc, sf_sig;
  logic [1:0] tag_state;
  logic [2:0] auth_level;
  logic eas_armed, ev_rx_err, ev_corr, ev_late, ev_resp, ev_drop, rx_mode256;
  int checks = 0, failures = 0;

  always #37 clk = ~clk;   // 13.56 MHz

  rfid_tag_top dut (.clk, .por_n, .carrier_i(carrier & brk), .mod_o(mod),
    .sf_key, .sf_trn, .sf_rrn, .sf_crc, .sf_tf, .sf_rf, .sf_sig,
    .tag_state, .auth_level, .eas_armed,
    .ev_rx_err, .ev_corr, .ev_late, .ev_resp, .ev_drop, .rx_mode256);
  rfid_reader rdr (.clk, .carrier, .mod);

  // external secure function model (the same in tb_data_flow)
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

  // mechanism counters
  int n_corr = 0, n_late = 0, n_resp = 0, n_drop = 0, n_rxerr = 0;
  int n_m4 = 0, n_m256 = 0, n_dual = 0, n_single = 0, n_fast = 0, n_slow = 0;
  int n_slot16 = 0, n_auth = 0, n_write = 0, n_eas = 0, n_quiet = 0;
  logic prog_q = 1'b0;
  always @(posedge clk) if (dut.rst_n) begin
    if (ev_corr)   n_corr++;
    if (ev_late)   n_late++;
    if (ev_resp)   n_resp++;
    if (ev_drop)   n_drop++;
    if (ev_rx_err) n_rxerr++;
    if (dut.u_eec.prog && !prog_q) n_write++;
    prog_q <= dut.u_eec.prog;
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [7:0] uidb(input int i);
    return UID[8*i +: 8];
  endfunction

  // one exchange: send the request, wait for a response (r empty if none)
  task automatic xfer(input logic [7:0] d[$], input bit m256, output logic [7:0] r[$],
                      input bit secure = 0, input bit corrupt = 0, input bit expect_rsp = 1);
    logic [7:0] f[$], body[$], raw[$];
    logic [15:0] c, rc;
    bit ok, dual, fast, wr;
    longint t_end, t_st, period, tmo;
    f = d;
    if (d.size() > 0) begin
      c = rdr.crc16(d);
      if (secure) c = f_sig(c, KEY_U0);
      if (corrupt) c = c ^ 16'h0100;
      f.push_back(c[7:0]);
      f.push_back(c[15:8]);
    end
    dual = (d.size() > 0) ? d[0][0] : 1'b0;
    fast = (d.size() > 0) ? d[0][1] : 1'b1;
    rdr.send(f, m256, 1'b1, 1'b0);
    t_end = rdr.cyc;
    period = m256 ? 65536 : 1024;
    // a write (erase + program of one block) adds about 30000 clk
    wr = d.size() > 1 && (d[1] inside {8'h21, 8'h22, 8'h27, 8'hF2});
    tmo = 2 * period + T1 + 6000 + (wr ? 40000 : 0);
    if (m256) n_m256++; else n_m4++;
    rdr.receive(raw, ok, t_st, dual, fast, tmo);
    r.delete();
    if (!expect_rsp) begin
      check(raw.size() == 0, "no response expected");
      return;
    end
    check(ok && raw.size() >= 3, $sformatf("response received (%0d bytes)", raw.size()));
    if (!(ok && raw.size() >= 3)) return;
    if (dual) n_dual++; else n_single++;
    if (fast) n_fast++; else n_slow++;
    body = raw[0:raw.size()-3];
    rc = rdr.crc16(body);
    if (secure) rc = f_sig(rc, KEY_U0);
    check({raw[$], raw[$-1]} == rc, "response CRC");
    check(t_st - t_end >= T1 && (wr || t_st - t_end <= 2 * period + T1 + 600),
          $sformatf("reply delay %0d clk after the request", t_st - t_end));
    r = body;
  endtask

  initial begin
    logic [7:0] d[$], r[$], none[$];
    logic [47:0] trn, rrn, tf, rf;
    repeat (20) @(posedge clk);
    por_n = 1;
    wait (dut.boot_done);
    repeat (100) @(posedge clk);
    check(dut.uid == UID, "UID loaded at boot");

    // inventory, one slot, 1/4 coding
    d = '{8'h26, 8'h01, 8'h00};
    xfer(d, 0, r);
    check(r.size() == 10 && r[0] == 8'h00, "inventory answer");
    for (int i = 0; i < 8; i++) if (r.size() == 10) check(r[2+i] == uidb(i), $sformatf("inventory UID byte %0d", i));
    // inventory, 16 slots, no mask, two subcarriers: slot = UID[3:0] = 8
    d = '{8'h07, 8'h01, 8'h00};
    xfer(d, 0, r, 0, 0, 0);
    for (int s = 1; s <= 8; s++) begin
      rdr.send(none, 1'b0, 1'b1, 1'b0);
      begin
        logic [7:0] raw[$];
        bit ok;
        longint ts;
        rdr.receive(raw, ok, ts, 1'b1, 1'b1, 2 * 1024 + T1 + 6000);
        check((s == 8) == (ok && raw.size() == 12), $sformatf("16-slot inventory, slot %0d", s));
        if (s == 8 && ok && raw.size() == 12) begin
          n_slot16++; n_dual++;
          check(raw[2] == uidb(0) && raw[9] == uidb(7), "16-slot answer UID");
        end
      end
    end
    // select, stay quiet, reset to ready
    d = '{8'h22, 8'h25, uidb(0), uidb(1), uidb(2), uidb(3), uidb(4), uidb(5), uidb(6), uidb(7)};
    xfer(d, 0, r);
    check(r.size() == 1 && tag_state == 2'd2, "select");
    d = '{8'h22, 8'h02, uidb(0), uidb(1), uidb(2), uidb(3), uidb(4), uidb(5), uidb(6), uidb(7)};
    xfer(d, 0, r, 0, 0, 0);
    check(tag_state == 2'd1, "stay quiet");
    if (tag_state == 2'd1) n_quiet++;
    d = '{8'h26, 8'h01, 8'h00};
    xfer(d, 0, r, 0, 0, 0);
    d = '{8'h22, 8'h26, uidb(0), uidb(1), uidb(2), uidb(3), uidb(4), uidb(5), uidb(6), uidb(7)};
    xfer(d, 0, r);
    check(r.size() == 1 && tag_state == 2'd0, "reset to ready");
    // 1/256 coding: read block 0; block 255 does not exist
    d = '{8'h02, 8'h23, 8'h00, 8'h00};
    xfer(d, 1, r);
    check(r.size() == 5 && r[1] == uidb(0) && r[4] == uidb(3), "1/256 read block 0");
    d = '{8'h02, 8'h23, 8'hFF, 8'h00};
    xfer(d, 1, r);
    check(r.size() == 2 && r[0] == 8'h01 && r[1] == 8'h10, "1/256 read of a missing block");
    check(rx_mode256, "1/256 coding detected");
    // write block 60, read it back at the low data rate
    d = '{8'h02, 8'h21, 8'd60, 8'hFF, 8'h3C, 8'hC3, 8'h5A};
    xfer(d, 0, r);
    check(r.size() == 1 && r[0] == 8'h00, "write block");
    d = '{8'h00, 8'h23, 8'd60, 8'h00};
    xfer(d, 0, r);
    check(r.size() == 5 && r[1] == 8'hFF && r[2] == 8'h3C && r[3] == 8'hC3 && r[4] == 8'h5A,
          "low-rate read back");
    // lock it; a second write is refused
    d = '{8'h02, 8'h22, 8'd60};
    xfer(d, 0, r);
    check(r.size() == 1 && r[0] == 8'h00, "lock block");
    d = '{8'h02, 8'h21, 8'd60, 8'h00, 8'h00, 8'h00, 8'h00};
    xfer(d, 0, r);
    check(r.size() == 2 && r[1] == 8'h12, "write to locked block refused");
    // EAS: set through AFI, alarm inventory answered
    d = '{8'h02, 8'h27, EAS};
    xfer(d, 0, r);
    check(r.size() == 1 && eas_armed, "EAS set");
    d = '{8'h36, 8'h01, EAS, 8'h00};
    xfer(d, 0, r);
    check(r.size() == 10, "EAS alarm answer");
    if (r.size() == 10) n_eas++;
    // protected block refused without authentication
    d = '{8'h02, 8'h23, 8'd20, 8'h00};
    xfer(d, 0, r);
    check(r.size() == 2 && r[1] == 8'h0F, "protected read refused");
    // authentication with user key 0
    d = '{8'h02, 8'hF0, 8'h01};
    xfer(d, 0, r);
    check(r.size() == 7 && r[0] == 8'h00, "authentication 1");
    for (int i = 0; i < 6; i++) trn[8*i +: 8] = (r.size() == 7) ? r[1+i] : 8'h00;
    rrn = {$urandom, $urandom};
    tf = f_tf(trn, rrn, KEY_U0);
    rf = f_rf(trn, rrn, KEY_U0);
    d = '{8'h02, 8'hF1};
    for (int i = 0; i < 6; i++) d.push_back(rrn[8*i +: 8]);
    for (int i = 0; i < 6; i++) d.push_back(tf[8*i +: 8]);
    xfer(d, 0, r);
    check(r.size() == 7 && auth_level == 3'd2, "authentication 2");
    if (r.size() == 7) begin
      logic [47:0] got;
      for (int i = 0; i < 6; i++) got[8*i +: 8] = r[1+i];
      check(got == rf, "tag's RF matches");
      if (got == rf) n_auth++;
    end
    // secure write / read in the user area, signed CRC both ways
    d = '{8'h02, 8'hF2, 8'd22, 8'h0D, 8'h15, 8'hEA, 8'h5E};
    xfer(d, 0, r, 1);
    check(r.size() == 1 && r[0] == 8'h00, "write secure");
    d = '{8'h02, 8'hF3, 8'd22, 8'h00};
    xfer(d, 0, r, 1);
    check(r.size() == 5 && r[1] == 8'h0D && r[4] == 8'h5E, "read multiple secure");
    // bad CRC and unsupported command: dropped
    d = '{8'h02, 8'h23, 8'd44, 8'h00};
    xfer(d, 0, r, 0, 1, 0);
    d = '{8'h02, 8'h2C, 8'd44};
    xfer(d, 0, r, 0, 0, 0);
    // an extra pause inside a request: timing failure, no answer
    fork
      xfer(d, 0, r, 0, 0, 0);
      begin
        repeat (3000) @(posedge clk);
        while (!carrier) @(posedge clk);
        repeat (300) @(posedge clk);
        brk = 1'b0;
        repeat (128) @(posedge clk);
        brk = 1'b1;
      end
    join
    // the tag still works afterwards
    d = '{8'h26, 8'h01, 8'h00};
    xfer(d, 0, r);
    check(r.size() == 10, "inventory after a timing failure");

    $display("corrections=%0d late=%0d responses=%0d dropped=%0d timing_failures=%0d",
             n_corr, n_late, n_resp, n_drop, n_rxerr);
    $display("req 1/4=%0d 1/256=%0d single=%0d dual=%0d fast=%0d slow=%0d",
             n_m4, n_m256, n_single, n_dual, n_fast, n_slow);
    $display("slot16=%0d auth=%0d eeprom_writes=%0d eas=%0d quiet=%0d",
             n_slot16, n_auth, n_write, n_eas, n_quiet);
    check(n_corr > 0, "mechanism: phase correction");
    check(n_late > 0, "mechanism: late last-slot recovery");
    check(n_resp > 0, "mechanism: response");
    check(n_drop > 0, "mechanism: dropped request");
    check(n_rxerr > 0, "mechanism: timing failure");
    check(n_m4 > 0 && n_m256 > 0, "mechanism: both codings");
    check(n_single > 0 && n_dual > 0, "mechanism: both subcarrier modes");
    check(n_fast > 0 && n_slow > 0, "mechanism: both data rates");
    check(n_slot16 > 0, "mechanism: 16-slot inventory");
    check(n_auth > 0, "mechanism: authentication");
    check(n_write > 0, "mechanism: EEPROM write");
    check(n_eas > 0, "mechanism: EAS alarm");
    check(n_quiet > 0, "mechanism: quiet state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
