// tb_manchester_enc: self-checking testbench of the response modulator.
//
// For each combination of subcarrier mode (one / two) and data rate (fast /
// low) a random response is sent. The testbench builds the expected
// modulator waveform on its own from the chip rules (SOF, Manchester bits
// LSB first, EOF; 423.75 kHz = clk/32 and 484.28 kHz = clk/28; 8 or 32
// subcarrier periods per chip) and compares it with mod_o clock by clock,
// allowing only a fixed pipeline offset. Also checked: the frame length in
// clk cycles (one bit = 512 clk at the fast rate), every byte taken once.
`timescale 1ns/1ps
module tb_manchester_enc;
  logic clk = 0, rst_n = 0;
  logic start = 0, dual_sub = 0, fast = 1, byte_valid = 0;
  logic [7:0] byte_i = 0;
  logic byte_ready, mod_o, busy, done;
  int checks = 0, failures = 0;

  always #37 clk = ~clk;

  manchester_enc dut (.*);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // expected waveform of one chip
  task automatic add_chip(ref logic q[$], input bit m, input bit dual, input bit fst);
    int len, per;
    len = (dual && !m) ? 252 : 256;
    if (!fst) len *= 4;
    per = m ? 32 : 28;
    for (int j = 0; j < len; j++)
      q.push_back((m || dual) ? ((j % per) < per / 2) : 1'b0);
  endtask

  task automatic run(input bit dual, input bit fst, input int nbytes);
    logic [7:0] data[$];
    logic exp_w[$], got_w[$];
    bit sof_c[8] = '{0,0,0,1,1,1,0,1};
    bit eof_c[8] = '{1,0,1,1,1,0,0,0};
    int idx, best, mism;
    for (int i = 0; i < nbytes; i++) data.push_back(8'($urandom));
    foreach (sof_c[i]) add_chip(exp_w, sof_c[i], dual, fst);
    foreach (data[i])
      for (int b = 0; b < 8; b++) begin
        add_chip(exp_w, !data[i][b], dual, fst);
        add_chip(exp_w,  data[i][b], dual, fst);
      end
    foreach (eof_c[i]) add_chip(exp_w, eof_c[i], dual, fst);

    @(negedge clk);
    dual_sub = dual; fast = fst; start = 1;
    idx = 0;
    byte_valid = (nbytes > 0);
    byte_i = (nbytes > 0) ? data[0] : 8'h00;
    @(negedge clk); start = 0;
    while (!done) begin
      @(posedge clk);
      got_w.push_back(mod_o);
      if (byte_ready) begin
        idx++;
        #1;
        byte_valid = (idx < nbytes);
        byte_i = (idx < nbytes) ? data[idx] : 8'h00;
      end
    end
    check(idx == nbytes, $sformatf("dual=%0d fast=%0d: %0d bytes taken of %0d", dual, fst, idx, nbytes));
    // frame length: within a few cycles of the sum of the chip lengths
    check(got_w.size() >= exp_w.size() && got_w.size() <= exp_w.size() + 3,
          $sformatf("dual=%0d fast=%0d: frame %0d clk, expected %0d", dual, fst, got_w.size(), exp_w.size()));
    // waveform, at the best fixed offset
    best = 1 << 30;
    for (int o = 0; o <= 3; o++) begin
      mism = 0;
      for (int t = 0; t < exp_w.size() && t + o < got_w.size(); t++)
        if (got_w[t + o] != exp_w[t]) mism++;
      if (mism < best) best = mism;
    end
    check(best == 0, $sformatf("dual=%0d fast=%0d: %0d waveform mismatches", dual, fst, best));
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    run(0, 1, 4);
    run(1, 1, 3);
    run(0, 0, 2);
    run(1, 0, 2);
    run(0, 1, 0);
    // one bit at the fast rate is 512 clk (37.76 us, 26.48 kbit/s)
    begin
      longint t0, t1;
      @(negedge clk); dual_sub = 0; fast = 1; byte_valid = 1; byte_i = 8'h5A; start = 1;
      @(negedge clk); start = 0;
      t0 = $time;
      @(posedge byte_ready); #1 byte_valid = 0;
      @(posedge done);
      t1 = $time;
      check((t1 - t0) / 74 >= 2048 + 4096 + 2048 - 4 && (t1 - t0) / 74 <= 2048 + 4096 + 2048 + 4,
            $sformatf("one-byte frame lasts %0d clk", (t1 - t0) / 74));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
