// rfid_tag_top: digital controller of an HF (13.56 MHz) RFID tag,
// ISO/IEC 15693 / 18000-3 compatible, with a 2-kbit EEPROM and four custom
// secure commands.
//
// Blocks and their wiring:
//   reset_gen      power-on reset from the analog power-good signal
//   clk_gen        sample clock (13.56 MHz / 4) and the "no clock during a
//                  pause" enable of the detection counter
//   data_process   pulse-position detection (ppm_decoder), request buffer and
//                  CRC check (crc16), response modulation (manchester_enc)
//   data_flow      command analysis, tag states, collision management,
//                  authentication, access rights, response building
//   rng48          48-bit random numbers for the authentication
//   mem_ctrl       memory controller: EEPROM interface, boot load, lock check
//   eeprom_ctrl    EEPROM controller: erase / program / read sequencing
//   eeprom_array   2-kbit array with its analog driver (behavioural model)
// The analog front end (antenna, rectifier, demodulator, load modulator,
// clock recovery) is outside: clk, por_n, carrier_i and mod_o are its
// signals. The TF / RF authentication functions and the signed-CRC cipher
// are outside as well: the sf_* ports carry their inputs and results and must
// be combinational (results valid in the cycle after the inputs change).
// The partition into data process, data flow, memory controller, clock and
// reset generators follows the design; the EEPROM timing parameters and the
// initial contents are this implementation's.
//
// The internal reset rst_n is reported by lint as used both asynchronously
// and synchronously: the synchronous uses are the `disable iff` clauses of
// the interface assertions in data_flow, mem_ctrl and eeprom_ctrl.
//
// Timing: every block runs on clk (13.56 MHz); the reply to a request starts
// T1 = 4352 clk (320.9 us) after the request has been recognised as complete.
module rfid_tag_top #(
  parameter logic [63:0] INIT_UID  = 64'hE004_0100_1234_5678,
  parameter int unsigned T_PULSE   = 13560,   // EEPROM erase / program pulse (1 ms)
  parameter int unsigned HV_RAMP   = 1356,    // EEPROM pump ramp (100 us)
  parameter int unsigned T1_CYCLES = 4352
) (
  input  logic        clk,        // 13.56 MHz from the carrier
  input  logic        por_n,      // full power received
  input  logic        carrier_i,  // demodulated field, 1 = carrier present
  output logic        mod_o,      // load modulation
  // secure function (TF, RF, signed CRC), outside the controller
  output logic [47:0] sf_key,
  output logic [47:0] sf_trn,
  output logic [47:0] sf_rrn,
  output logic [15:0] sf_crc,
  input  logic [47:0] sf_tf,
  input  logic [47:0] sf_rf,
  input  logic [15:0] sf_sig,
  // status
  output logic [1:0]  tag_state,   // 0 ready, 1 quiet, 2 selected
  output logic [2:0]  auth_level,  // 0 none, 1 super, 2..4 user key 0..2
  output logic        eas_armed,
  // event strobes (one clk each), for monitoring
  output logic        ev_rx_err,   // request dropped: timing failure / too long
  output logic        ev_corr,     // detection counter phase corrected
  output logic        ev_late,     // last-slot pause recovered from the next period
  output logic        ev_resp,     // response started
  output logic        ev_drop,     // request dropped: CRC, address, unsupported
  output logic        rx_mode256   // last request used 1/256 coding
);
  import rfid_pkg::*;

  localparam int unsigned RXBUF = 32;
  localparam int unsigned TXBUF = 48;

  logic rst_n, ce_sample, ce_rx;

  reset_gen u_rst (.clk, .por_n, .rst_n);
  clk_gen   u_clk (.clk, .rst_n, .carrier_i, .ce_sample, .ce_rx);

  // data process <-> data flow
  logic        rx_valid, rx_crc_ok;
  logic [7:0]  rx_len;
  logic [7:0]  rx_buf [RXBUF];
  logic [15:0] rx_crc_calc, rx_crc_rcv;
  logic        tx_start, tx_dual, tx_fast, tx_busy;
  logic [7:0]  tx_len;
  logic [7:0]  tx_buf [TXBUF];

  data_process #(.RXBUF(RXBUF), .TXBUF(TXBUF)) u_dp (
    .clk, .rst_n, .ce_sample, .ce_rx, .carrier_i,
    .rx_valid, .rx_err(ev_rx_err), .rx_len, .rx_buf, .rx_crc_ok, .rx_crc_calc, .rx_crc_rcv,
    .tx_start, .tx_len, .tx_buf, .tx_dual, .tx_fast, .tx_busy, .mod_o,
    .ev_corr, .ev_late, .rx_mode256);

  // data flow <-> memory controller / random generator
  logic        mem_valid, mem_ack, mem_err, boot_done, afi_lock;
  mem_req_t    mem_req;
  word_t       mem_rdata;
  logic [63:0] uid, lock_bits;
  logic [7:0]  afi, dsfid;
  logic        rnd_req, rnd_valid;
  logic [47:0] rnd;
  tag_state_e  st_e;
  auth_e       au_e;

  data_flow #(.RXBUF(RXBUF), .TXBUF(TXBUF), .T1_CYCLES(T1_CYCLES)) u_df (
    .clk, .rst_n,
    .rx_valid, .rx_len, .rx_buf, .rx_crc_ok, .rx_crc_calc, .rx_crc_rcv,
    .tx_start, .tx_len, .tx_buf, .tx_dual, .tx_fast, .tx_busy,
    .mem_valid, .mem_req, .mem_ack, .mem_err, .mem_rdata,
    .boot_done, .uid, .afi, .dsfid, .afi_lock, .lock_bits,
    .rnd_req, .rnd_valid, .rnd,
    .sf_key, .sf_trn, .sf_rrn, .sf_crc, .sf_tf, .sf_rf, .sf_sig,
    .tag_state(st_e), .auth_level(au_e), .eas_armed, .ev_resp, .ev_drop);

  assign tag_state  = st_e;
  assign auth_level = au_e;

  rng48 u_rng (.clk, .rst_n, .entropy_i(carrier_i), .req(rnd_req), .rnd_o(rnd), .rnd_valid);

  // memory controller -> EEPROM controller -> array
  logic   ee_start, ee_done;
  ee_op_e ee_op;
  blk_t   ee_addr, row;
  word_t  ee_wdata, ee_rdata, din, dout;
  logic   hv_en, hv_ok, erase, prog, read_en;

  mem_ctrl u_mem (
    .clk, .rst_n, .req_valid(mem_valid), .req(mem_req), .ack(mem_ack), .err(mem_err),
    .rdata(mem_rdata), .boot_done, .uid, .afi, .dsfid, .afi_lock, .lock_bits,
    .ee_start, .ee_op, .ee_addr, .ee_wdata, .ee_done, .ee_rdata);

  eeprom_ctrl #(.T_PULSE(T_PULSE)) u_eec (
    .clk, .rst_n, .start(ee_start), .op(ee_op), .addr(ee_addr), .wdata(ee_wdata),
    .busy(), .done(ee_done), .rdata(ee_rdata),
    .hv_en, .hv_ok, .row, .din, .erase, .prog, .read_en, .dout);

  eeprom_array #(.HV_RAMP(HV_RAMP), .MIN_PULSE(T_PULSE), .INIT_UID(INIT_UID)) u_arr (
    .clk, .hv_en, .hv_ok, .row, .din, .erase, .prog, .read_en, .dout);
endmodule
