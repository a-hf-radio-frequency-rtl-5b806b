// data_process: data process module of the tag, the link between the air
// interface and the data flow.
//
// Receive side: the pulse-position detector turns the demodulated field into
// bytes; data_process stores them in a request buffer of RXBUF bytes and runs
// the CRC16 over all bytes but the last two. When the detector reports a
// complete request it presents the buffer, its length (CRC included), the
// computed CRC, the received CRC and whether they match; the data flow
// decides what the bytes mean (a secure command carries a signed CRC that it
// checks itself). A timing failure or a request longer than the buffer is
// reported on rx_err and the request is dropped.
// Transmit side: on tx_start it streams tx_len bytes of tx_buf into the
// Manchester modulator, which adds SOF and EOF.
// The split (data process arranges bytes without caring about their content,
// and modulates the output) follows the design; buffer sizes and the
// interface to the data flow are this implementation's choice.
//
// Timing: rx_valid / rx_err pulse one clk after the detector's frame end; the
// buffer stays valid until the next SOF. tx_busy rises the cycle after
// tx_start and falls at the end of the EOF.
module data_process
  import rfid_pkg::*;
#(
  parameter int unsigned RXBUF = 32,
  parameter int unsigned TXBUF = 48
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce_sample,
  input  logic        ce_rx,
  input  logic        carrier_i,
  // request to the data flow
  output logic        rx_valid,
  output logic        rx_err,
  output logic [7:0]  rx_len,
  output logic [7:0]  rx_buf [RXBUF],
  output logic        rx_crc_ok,
  output logic [15:0] rx_crc_calc,
  output logic [15:0] rx_crc_rcv,
  // response from the data flow
  input  logic        tx_start,
  input  logic [7:0]  tx_len,
  input  logic [7:0]  tx_buf [TXBUF],
  input  logic        tx_dual,
  input  logic        tx_fast,
  output logic        tx_busy,
  output logic        mod_o,
  // detector events
  output logic        ev_corr,
  output logic        ev_late,
  output logic        rx_mode256
);
  logic       sof, byte_valid, frame_end, frame_err;
  logic [7:0] byte_o;
  logic [7:0] d0, d1;          // the two most recent bytes
  logic [7:0] n;               // bytes received
  logic       ovf;
  logic [15:0] crc;

  ppm_decoder u_det (
    .clk, .rst_n, .ce_sample, .ce_rx, .carrier_i,
    .sof, .mode256(rx_mode256), .byte_valid, .byte_o, .frame_end, .frame_err,
    .corr_evt(ev_corr), .late_evt(ev_late));

  // CRC runs two bytes behind, so that it covers everything but the CRC field
  crc16 u_crc (
    .clk, .rst_n, .init(sof), .en(byte_valid && n >= 8'd2), .data(d1), .crc_o(crc));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d0 <= '0; d1 <= '0; n <= '0; ovf <= 1'b0;
      rx_valid <= 1'b0; rx_err <= 1'b0; rx_len <= '0;
      rx_crc_ok <= 1'b0; rx_crc_calc <= '0; rx_crc_rcv <= '0;
      for (int i = 0; i < RXBUF; i++) rx_buf[i] <= '0;
    end else begin
      rx_valid <= 1'b0;
      rx_err   <= 1'b0;
      if (sof) begin
        n   <= '0;
        ovf <= 1'b0;
      end
      if (byte_valid) begin
        d1 <= d0;
        d0 <= byte_o;
        if (n < 8'(RXBUF)) rx_buf[n[$clog2(RXBUF)-1:0]] <= byte_o;
        else               ovf <= 1'b1;
        if (n != 8'hFF) n <= n + 8'd1;
      end
      if (frame_err) rx_err <= 1'b1;
      if (frame_end) begin
        if (ovf) rx_err <= 1'b1;
        else begin
          rx_valid    <= 1'b1;
          rx_len      <= n;
          rx_crc_calc <= crc;
          rx_crc_rcv  <= {d0, d1};
          rx_crc_ok   <= (n >= 8'd2) && (crc == {d0, d1});
        end
      end
    end
  end

  // ---------------- transmit ----------------
  logic [7:0] tidx, tlen;
  logic       enc_ready, enc_busy;

  manchester_enc u_enc (
    .clk, .rst_n, .start(tx_start), .dual_sub(tx_dual), .fast(tx_fast),
    .byte_valid(tidx < tlen), .byte_i(tx_buf[tidx[$clog2(TXBUF)-1:0]]),
    .byte_ready(enc_ready), .mod_o, .busy(enc_busy), .done());

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tidx <= '0; tlen <= '0;
    end else if (tx_start) begin
      tidx <= '0;
      tlen <= (tx_len > 8'(TXBUF)) ? 8'(TXBUF) : tx_len;
    end else if (enc_ready) tidx <= tidx + 8'd1;
  end

  assign tx_busy = enc_busy;
endmodule
