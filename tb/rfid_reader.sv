// rfid_reader: behavioural model of an ISO/IEC 15693 reader, used by the
// testbenches of the data process and of the whole tag.
//
// send() codes a request in 1/4 or 1/256 pulse position coding on the
// carrier (SOF, one 9.44 us pause per symbol, EOF), optionally with random
// analog edge delays (falling edge up to 8 sample periods = 32 clk, rising
// edge up to 6 = 24 clk: four times the 8 / 6 clk a front end is specified
// for, as a margin), and can append the CRC16 itself. slot_marker() sends SOF + EOF only.
// receive() decodes the tag's load modulation: it classifies each
// half-bit chip as modulated (423.75 kHz, period 32 clk) or not (no
// subcarrier, or 484.28 kHz, period 28 clk, with two subcarriers), checks the
// SOF, reads Manchester bits LSB first up to the EOF and returns the bytes
// and the clk cycle at which the response began. Timing is in cycles of the
// 13.56 MHz clock.
`timescale 1ns/1ps
module rfid_reader (
  input  logic clk,
  output logic carrier,
  input  logic mod
);
  localparam int UNIT = 128;   // 9.44 us
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial carrier = 1'b1;

  // record rising edges of the load modulation
  longint edges[$];
  logic mod_q = 1'b0;
  always @(posedge clk) begin
    mod_q <= mod;
    if (mod && !mod_q) edges.push_back(cyc);
  end

  function automatic logic [15:0] crc16(input logic [7:0] b[$]);
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

  task automatic wait_until(input longint t);
    while (cyc < t) @(posedge clk);
  endtask

  task automatic pause(input longint t0, input longint t1, input bit jit);
    int jf, jr;
    jf = jit ? 4 * int'($urandom_range(0, 8)) : 0;
    jr = jit ? 4 * int'($urandom_range(0, 6)) : 0;
    wait_until(t0 + jf); carrier = 1'b0;
    wait_until(t1 + jr); carrier = 1'b1;
  endtask

  // send a request; the CRC is appended when add_crc is set
  task automatic send(input logic [7:0] data_in[$], input bit m256, input bit jit,
                      input bit add_crc = 1'b1);
    logic [7:0] data[$];
    logic [7:0] syms[$];
    logic [15:0] c;
    longint t;
    int nslot;
    data = data_in;
    if (add_crc) begin
      c = crc16(data);
      data.push_back(c[7:0]);
      data.push_back(c[15:8]);
    end
    nslot = m256 ? 256 : 4;
    foreach (data[i])
      if (m256) syms.push_back(data[i]);
      else for (int k = 0; k < 4; k++) syms.push_back(8'(data[i] >> (2 * k)) & 8'h3);
    edges.delete();
    t = cyc + 10;
    pause(t, t + UNIT, jit);
    t += UNIT + (m256 ? 3 : 5) * UNIT;
    pause(t, t + UNIT, jit);
    t += 2 * UNIT;
    foreach (syms[i]) begin
      longint p;
      p = t + syms[i] * 2 * UNIT + UNIT;
      pause(p, p + UNIT, jit);
      t += nslot * 2 * UNIT;
    end
    pause(t + UNIT, t + 2 * UNIT, jit);   // EOF
    edges.delete();
  endtask

  task automatic slot_marker(input bit m256);
    logic [7:0] none[$];
    send(none, m256, 1'b0, 1'b0);
  endtask

  // chip type at time t: 1 = modulated (423.75 kHz)
  function automatic bit chip_at(input longint t, input bit dual);
    int i;
    i = -1;
    foreach (edges[k]) if (edges[k] <= t) i = k;
    if (i < 0) return 1'b0;
    if (!dual) return (t - edges[i]) < 40;
    if (i + 1 < edges.size()) return (edges[i+1] - edges[i]) > 30;
    return 1'b1;
  endfunction

  // wait for a response and decode it; ok = 0 if none came or it was malformed
  task automatic receive(output logic [7:0] bytes[$], output bit ok, output longint t_start,
                         input bit dual, input bit fast, input longint timeout);
    longint t0, t, last;
    int lm, lu;
    bit c[$];
    bit sof_ok;
    bytes.delete();
    ok = 1'b0;
    t_start = -1;
    t0 = cyc;
    edges.delete();
    while (edges.size() == 0 && cyc < t0 + timeout) @(posedge clk);
    if (edges.size() == 0) return;
    // wait until the modulation has stopped
    last = edges[$];
    while (cyc < last + 4000) begin
      @(posedge clk);
      if (edges.size() > 0) last = edges[$];
    end
    lm = fast ? 256 : 1024;
    lu = dual ? (fast ? 252 : 1008) : lm;
    t = dual ? edges[0] : edges[0] - 3 * lu;   // frame start
    t_start = t;
    // chips until no modulation is left
    while (t < last + lm) begin
      bit m;
      m = chip_at(t + (lm / 2), dual);
      c.push_back(m);
      t += m ? lm : lu;
    end
    // SOF: U U U M M M, then logic 1 (U M)
    sof_ok = c.size() > 8 && !c[0] && !c[1] && !c[2] && c[3] && c[4] && c[5] && !c[6] && c[7];
    if (!sof_ok) return;
    begin
      bit bits[$];
      int k;
      k = 8;
      while (k + 1 < c.size()) begin
        if (c[k] && c[k+1]) break;              // M M: inside the EOF
        bits.push_back(!c[k] && c[k+1]);
        k += 2;
      end
      if (bits.size() == 0) return;
      void'(bits.pop_back());                   // the EOF's logic 0
      if (bits.size() % 8 != 0) return;
      for (int b = 0; b < bits.size() / 8; b++) begin
        logic [7:0] v;
        for (int j = 0; j < 8; j++) v[j] = bits[8*b + j];
        bytes.push_back(v);
      end
    end
    ok = 1'b1;
  endtask
endmodule
