// tb_ppm_decoder: self-checking testbench of the pulse-position data detection.
//
// A reader model drives the demodulated carrier: SOF, one pause per symbol in
// the second half of its slot, EOF. Pause edges are delayed at random as an
// analog front end would. The front end is specified for up to 8 clk on the
// falling edge and 6 clk on the rising edge; the test uses up to 32 and 24 clk
// (8 and 6 sample periods) as a margin, so the counter's phase correction and
// the late last-slot path are both exercised. Checks: decoded bytes, frame_end / frame_err, the byte rate
// (one byte per 4.833 ms in 1/256 mode, per 302 us in 1/4 mode), and that the
// correction and the last-slot recovery each happened.
`timescale 1ns/1ps
module tb_ppm_decoder;
  logic clk = 0, rst_n = 0, carrier = 1;
  logic ce_sample, ce_rx;
  logic sof, mode256, byte_valid, frame_end, frame_err, corr_evt, late_evt;
  logic [7:0] byte_o;
  int checks = 0, failures = 0;
  longint cyc = 0;
  int n_corr = 0, n_late = 0;

  always #37 clk = ~clk;   // ~13.56 MHz
  always_ff @(posedge clk) cyc <= cyc + 1;

  logic [1:0] dv = 0;
  always_ff @(posedge clk) dv <= dv + 1;
  assign ce_sample = (dv == 2'd3);
  assign ce_rx     = ce_sample & carrier;

  ppm_decoder dut (.*, .carrier_i(carrier));

  // captured bytes
  logic [7:0] rxb[$];
  longint     rxt[$];
  int n_end = 0, n_err = 0;
  always_ff @(posedge clk) begin
    if (byte_valid) begin rxb.push_back(byte_o); rxt.push_back(cyc); end
    if (frame_end) n_end++;
    if (frame_err) n_err++;
    if (corr_evt)  n_corr++;
    if (late_evt)  n_late++;
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wait_until(input longint t);
    while (cyc < t) @(posedge clk);
  endtask

  // one pause, ideal [t0, t1) in clk cycles, with analog edge delays
  task automatic pause(input longint t0, input longint t1, input bit jit);
    int jf, jr;
    jf = jit ? 4 * int'($urandom_range(0, 8)) : 0;
    jr = jit ? 4 * int'($urandom_range(0, 6)) : 0;
    wait_until(t0 + jf); carrier = 0;
    wait_until(t1 + jr); carrier = 1;
  endtask

  localparam int UNIT = 128;   // 9.44 us in clk cycles

  task automatic send(input bit m256, input logic [7:0] data[$], input bit jit,
                      input int bad_at = -1);
    longint t;
    int nslot;
    logic [7:0] syms[$];
    nslot = m256 ? 256 : 4;
    foreach (data[i])
      if (m256) syms.push_back(data[i]);
      else for (int k = 0; k < 4; k++) syms.push_back(8'(data[i] >> (2 * k)) & 8'h3);
    t = cyc + 10;
    pause(t, t + UNIT, jit);
    t += UNIT + (m256 ? 3 : 5) * UNIT;
    pause(t, t + UNIT, jit);
    t += 2 * UNIT;
    foreach (syms[i]) begin
      longint p;
      p = t + syms[i] * 2 * UNIT + ((i == bad_at) ? 0 : UNIT);
      pause(p, p + UNIT, jit);
      t += nslot * 2 * UNIT;
    end
    pause(t + UNIT, t + 2 * UNIT, jit);  // EOF
    wait_until(t + (2 * nslot + 2) * 2 * UNIT);
  endtask

  task automatic run(input string name, input bit m256, input logic [7:0] data[$], input bit jit);
    int e0;
    rxb.delete(); rxt.delete();
    e0 = n_end;
    send(m256, data, jit);
    check(n_end == e0 + 1, {name, ": frame_end"});
    check(rxb.size() == data.size(), $sformatf("%s: %0d bytes, got %0d", name, data.size(), rxb.size()));
    foreach (data[i])
      if (i < rxb.size()) check(rxb[i] == data[i], $sformatf("%s: byte %0d exp %02h got %02h", name, i, data[i], rxb[i]));
    // byte rate: one byte per frame of 256 slots (4.833 ms) or per 4 frames of 4 slots (302 us)
    for (int i = 1; i < rxt.size(); i++) begin
      longint d, exp;
      d = rxt[i] - rxt[i-1];
      exp = m256 ? 65536 : 4096;
      check(d > exp - 300 && d < exp + 300, $sformatf("%s: byte interval %0d", name, d));
    end
  endtask

  initial begin
    logic [7:0] d[$];
    repeat (20) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);

    d = '{8'h00, 8'h01, 8'hFF, 8'hA5, 8'h5A, 8'h33, 8'hFF, 8'hC0};
    run("1/4 clean", 0, d, 0);
    check(mode256 == 1'b0, "mode 1/4 detected");
    run("1/4 jitter", 0, d, 1);
    d.delete();
    for (int i = 0; i < 24; i++) d.push_back(8'($urandom));
    d.push_back(8'hFF);
    run("1/4 long jitter", 0, d, 1);
    d = '{8'h01, 8'hFF, 8'h00, 8'h7E};
    run("1/256 jitter", 1, d, 1);
    check(mode256 == 1'b1, "mode 1/256 detected");
    d.delete();
    run("empty frame", 0, d, 1);
    // a pause in the first half of its slot is a timing failure
    begin
      int e0;
      e0 = n_err;
      d = '{8'h12, 8'h34};
      send(0, d, 0, 3);
      check(n_err == e0 + 1, "timing failure flagged");
    end
    check(n_corr > 0, "phase correction applied");
    check(n_late > 0, "late last-slot pause recovered");
    $display("corrections=%0d late=%0d", n_corr, n_late);
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
