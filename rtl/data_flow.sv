// data_flow: data flow module of the tag, the command interpreter.
//
// Takes each complete request from the data process, decides whether to drop
// it (bad CRC, timing failure, not supported, not addressed to this tag),
// ignore it (quiet tag, slot not reached) or answer it, carries it out with
// the memory controller, the random generator and the external secure
// function, builds the response, appends its CRC16 (signed for the secure
// commands) and hands it to the data process after the tag's reply delay t1
// (T1_CYCLES clk after the end of the request).
//
// Commands (codes from the design's command table, frame formats of
// ISO/IEC 15693-3 for the standard ones):
//   0x01 inventory, one or 16 slots, AFI and mask matching. With 16 slots
//        the tag's slot is the 4 UID bits after the mask; each empty request
//        (SOF + EOF, a "slot marker") advances the slot. An inventory with
//        AFI = EAS_AFI is the EAS alarm inventory: only tags whose AFI is
//        EAS_AFI (EAS set) answer.
//   0x02 stay quiet, 0x25 select, 0x26 reset to ready: tag state machine
//        READY / QUIET / SELECTED with the address and select flags.
//   0x21 write block, 0x22 lock block, 0x23 read multiple blocks (up to
//        MAX_RD blocks, with lock status bytes when the option flag is set).
//   0x27 write AFI; writing EAS_AFI sets EAS, any other value resets it.
//   0xF0 authentication 1: data = key index (0 super key, 1..3 user key
//        0..2); answer = the tag's 48-bit random number TRN.
//   0xF1 authentication 2: data = reader random RRN (6 bytes) and TF
//        (6 bytes). The tag has TF' and RF' computed from (TRN, RRN, key) by
//        the secure function; if TF = TF' it grants the key's access level
//        and answers RF', else it clears all rights and answers an error.
//   0xF2 write secure, 0xF3 read multiple secure: as 0x21 / 0x23 but checked
//        against the granted level, and protected by a signed CRC (the CRC16
//        combined with the session key by the secure function) in both
//        directions.
// The command list, the authentication exchange and the signed CRC follow
// the design. The layouts of the custom commands, the EAS-by-AFI encoding,
// the memory map and access rules (rfid_pkg), the read size limit and the
// choice to drop rather than answer unsupported commands are this
// implementation's.
//
// Interfaces: request buffer from data_process (held until the next request);
// response buffer to data_process (held while tx_busy); memory requests held
// until mem_ack; the secure function is combinational outside this module:
// sf_key/sf_trn/sf_rrn/sf_crc are driven from registers, sf_tf/sf_rf/sf_sig
// are read one cycle later.
//
// The assertions at the end check the interface rules in simulation. Their
// `disable iff (!rst_n)` is the only place where rst_n is read as a plain
// signal, which is why lint tools report rst_n as used both as an
// asynchronous reset and synchronously; no hardware is built from it.
module data_flow
  import rfid_pkg::*;
#(
  parameter int unsigned RXBUF     = 32,
  parameter int unsigned TXBUF     = 48,
  parameter int unsigned MAX_RD    = 8,
  parameter int unsigned T1_CYCLES = 4352,    // 320.9 us at 13.56 MHz
  parameter logic [7:0]  EAS_AFI   = 8'hEA
) (
  input  logic        clk,
  input  logic        rst_n,
  // request
  input  logic        rx_valid,
  input  logic [7:0]  rx_len,
  input  logic [7:0]  rx_buf [RXBUF],
  input  logic        rx_crc_ok,
  input  logic [15:0] rx_crc_calc,
  input  logic [15:0] rx_crc_rcv,
  // response
  output logic        tx_start,
  output logic [7:0]  tx_len,
  output logic [7:0]  tx_buf [TXBUF],
  output logic        tx_dual,
  output logic        tx_fast,
  input  logic        tx_busy,
  // memory controller
  output logic        mem_valid,
  output mem_req_t    mem_req,
  input  logic        mem_ack,
  input  logic        mem_err,
  input  word_t       mem_rdata,
  input  logic        boot_done,
  input  logic [63:0] uid,
  input  logic [7:0]  afi,
  input  logic [7:0]  dsfid,
  input  logic        afi_lock,
  input  logic [63:0] lock_bits,
  // random generator
  output logic        rnd_req,
  input  logic        rnd_valid,
  input  logic [47:0] rnd,
  // secure function (outside)
  output logic [47:0] sf_key,
  output logic [47:0] sf_trn,
  output logic [47:0] sf_rrn,
  output logic [15:0] sf_crc,
  input  logic [47:0] sf_tf,
  input  logic [47:0] sf_rf,
  input  logic [15:0] sf_sig,
  // status
  output tag_state_e  tag_state,
  output auth_e       auth_level,
  output logic        eas_armed,
  output logic        ev_resp,      // a response was started
  output logic        ev_drop       // a request was dropped (CRC, address, unsupported)
);
  typedef enum logic [4:0] {
    D_IDLE, D_SIGCHK, D_DECODE, D_RD_REQ, D_RD_WAIT, D_WR_WAIT, D_RNG,
    D_KEY_REQ, D_KEY_WAIT, D_AUTH2, D_CRC, D_SIGN, D_T1, D_TX
  } dst_e;
  dst_e st;
  localparam int TW = $clog2(TXBUF);   // response buffer index width

  logic [7:0]  flags, cmd;
  logic [7:0]  p;               // index of the first parameter byte
  logic        secure;          // request is 0xF2 / 0xF3
  logic [15:0] t1cnt;
  logic [7:0]  tn;              // response bytes so far
  logic [7:0]  ci;              // CRC index
  logic [15:0] crc_q;
  blk_t        blk;
  logic [7:0]  nleft;
  logic        opt;
  // inventory with 16 slots
  logic        inv_wait;
  logic [3:0]  inv_slot, cur_slot;
  // authentication
  logic        auth_pend;
  auth_e       pend_lvl;
  logic        key_hi;

  function automatic logic [7:0] rb(input logic [7:0] idx);
    return (idx < 8'(RXBUF)) ? rx_buf[idx[$clog2(RXBUF)-1:0]] : 8'h00;
  endfunction

  // inventory: does the mask (mlen bits, LSB first from byte index mp) match the UID?
  function automatic logic mask_match(input logic [7:0] mp, input logic [7:0] mlen);
    logic [63:0] mval, mmask;
    for (int i = 0; i < 8; i++) mval[8*i +: 8] = rb(mp + 8'(i));
    mmask = (mlen >= 8'd64) ? '1 : ((64'd1 << mlen[5:0]) - 64'd1);
    return ((mval ^ uid) & mmask) == '0;
  endfunction

  logic [47:0] trn_q, rrn_q, key_q, tf_q;

  assign eas_armed = (afi == EAS_AFI);
  assign sf_trn    = trn_q;
  assign sf_rrn    = rrn_q;
  assign sf_key    = key_q;

  wire  addressed = flags[FLG_ADDRESS];
  wire  [63:0] req_uid = {rb(9), rb(8), rb(7), rb(6), rb(5), rb(4), rb(3), rb(2)};
  wire  [31:0] req_word = {rb(p + 8'd4), rb(p + 8'd3), rb(p + 8'd2), rb(p + 8'd1)};

  always_ff @(posedge clk or negedge rst_n) begin : seq
    logic [7:0] mlen, mp, ap;
    logic [3:0] my_slot;
    logic       go;
    mlen = '0; mp = '0; ap = '0; my_slot = '0; go = 1'b0;
    if (!rst_n) begin
      st <= D_IDLE; flags <= '0; cmd <= '0; p <= '0; secure <= 1'b0;
      t1cnt <= '0; tn <= '0; ci <= '0; crc_q <= CRC_PRESET; blk <= '0; nleft <= '0; opt <= 1'b0;
      inv_wait <= 1'b0; inv_slot <= '0; cur_slot <= '0;
      auth_pend <= 1'b0; pend_lvl <= AUTH_NONE; key_hi <= 1'b0;
      trn_q <= '0; rrn_q <= '0; key_q <= '0; tf_q <= '0;
      tx_start <= 1'b0; tx_len <= '0; tx_dual <= 1'b0; tx_fast <= 1'b1;
      for (int i = 0; i < TXBUF; i++) tx_buf[i] <= '0;
      mem_valid <= 1'b0; mem_req <= '0; rnd_req <= 1'b0; sf_crc <= '0;
      tag_state <= ST_READY; auth_level <= AUTH_NONE;
      ev_resp <= 1'b0; ev_drop <= 1'b0;
    end else begin
      tx_start <= 1'b0;
      rnd_req  <= 1'b0;
      ev_resp  <= 1'b0;
      ev_drop  <= 1'b0;
      if (t1cnt != 16'hFFFF) t1cnt <= t1cnt + 16'd1;

      case (st)
        D_IDLE: if (rx_valid && boot_done) begin
          t1cnt  <= '0;
          if (rx_len == 8'd0) begin
            // slot marker of a 16-slot inventory (keeps the inventory's flags)
            secure <= 1'b0;
            if (inv_wait) begin
              cur_slot <= cur_slot + 4'd1;
              if (cur_slot + 4'd1 == inv_slot) begin
                inv_wait <= 1'b0;
                tx_buf[0] <= RSP_OK;
                tx_buf[1] <= dsfid;
                for (int i = 0; i < 8; i++) tx_buf[2+i] <= uid[8*i +: 8];
                tn <= 8'd10;
                ci <= '0; crc_q <= CRC_PRESET; st <= D_CRC;
              end else if (cur_slot == 4'd14) inv_wait <= 1'b0;
            end
          end else begin
            flags   <= rb(0);
            cmd     <= rb(1);
            secure  <= (rb(1) == CMD_WRITE_SECURE) || (rb(1) == CMD_READ_MULTI_SEC);
            p       <= (!rb(0)[FLG_INVENTORY] && rb(0)[FLG_ADDRESS]) ? 8'd10 : 8'd2;
            sf_crc  <= rx_crc_calc;
            tx_dual <= rb(0)[FLG_SUBCARRIER];
            tx_fast <= rb(0)[FLG_DATA_RATE];
            inv_wait <= 1'b0;
            if (rx_len < 8'd4) ev_drop <= 1'b1;
            else st <= D_SIGCHK;
          end
        end

        // CRC check: plain, or signed with the session key for secure commands
        D_SIGCHK: begin
          if (secure ? (auth_level != AUTH_NONE && sf_sig == rx_crc_rcv) : rx_crc_ok)
            st <= D_DECODE;
          else begin
            ev_drop <= 1'b1; st <= D_IDLE;
          end
        end

        D_DECODE: begin
          tn <= 8'd1;
          tx_buf[0] <= RSP_OK;
          st <= D_IDLE;
          if (flags[FLG_INVENTORY]) begin
            // ---------------- inventory ----------------
            ap = flags[FLG_SELECT] ? 8'd3 : 8'd2;
            mlen = rb(ap);
            mp = ap + 8'd1;
            go = (cmd == CMD_INVENTORY) && (tag_state != ST_QUIET) &&
                 (!flags[FLG_SELECT] || rb(2) == 8'h00 || rb(2) == afi) &&
                 (mlen <= (flags[FLG_ADDRESS] ? 8'd64 : 8'd60)) &&
                 mask_match(mp, mlen);
            my_slot = 4'((uid >> mlen[5:0]) & 64'hF);
            if (!go) ev_drop <= 1'b1;
            else if (flags[FLG_ADDRESS] || my_slot == 4'd0) begin
              tx_buf[1] <= dsfid;
              for (int i = 0; i < 8; i++) tx_buf[2+i] <= uid[8*i +: 8];
              tn <= 8'd10;
              ci <= '0; crc_q <= CRC_PRESET; st <= D_CRC;
            end else begin
              inv_wait <= 1'b1; inv_slot <= my_slot; cur_slot <= '0;
            end
          end else if ((addressed && req_uid != uid) ||
                       (flags[FLG_SELECT] && tag_state != ST_SELECTED) ||
                       (!addressed && !flags[FLG_SELECT] && tag_state == ST_QUIET)) begin
            ev_drop <= 1'b1;   // not for this tag
          end else begin
            case (cmd)
              CMD_STAY_QUIET: if (addressed) tag_state <= ST_QUIET;
                              else ev_drop <= 1'b1;
              CMD_SELECT: if (addressed) begin
                tag_state <= ST_SELECTED;
                ci <= '0; crc_q <= CRC_PRESET; st <= D_CRC;
              end else ev_drop <= 1'b1;
              CMD_RESET_READY: begin
                tag_state <= ST_READY;
                ci <= '0; crc_q <= CRC_PRESET; st <= D_CRC;
              end
              CMD_READ_MULTI, CMD_READ_MULTI_SEC: begin
                blk   <= blk_t'(rb(p));
                nleft <= rb(p + 8'd1) + 8'd1;
                opt   <= flags[FLG_OPTION];
                if (rb(p + 8'd1) >= 8'(MAX_RD) || rb(p) + rb(p + 8'd1) >= 8'(NBLOCKS)) begin
                  tx_buf[0] <= RSP_ERROR; tx_buf[1] <= ERR_NOT_AVAIL; tn <= 8'd2;
                  ci <= '0; crc_q <= CRC_PRESET; st <= D_CRC;
                end else st <= D_RD_REQ;
              end
              CMD_WRITE_BLOCK, CMD_WRITE_SECURE: begin
                if (rb(p) >= 8'(NBLOCKS) || !can_write(blk_t'(rb(p)), auth_level, secure)) begin
                  tx_buf[0] <= RSP_ERROR; tx_buf[1] <= ERR_ACCESS; tn <= 8'd2;
                  ci <= '0; crc_q <= CRC_PRESET; st <= D_CRC;
                end else if (lock_bits[rb(p)[5:0]]) begin
                  tx_buf[0] <= RSP_ERROR; tx_buf[1] <= ERR_LOCKED; tn <= 8'd2;
                  ci <= '0; crc_q <= CRC_PRESET; st <= D_CRC;
                end else begin
                  mem_valid <= 1'b1;
                  mem_req   <= '{we: 1'b1, addr: blk_t'(rb(p)), wdata: req_word};
                  st <= D_WR_WAIT;
                end
              end
              CMD_LOCK_BLOCK: begin
                if (rb(p) >= 8'(NBLOCKS) || !can_write(blk_t'(rb(p)), AUTH_NONE, 1'b0)) begin
                  tx_buf[0] <= RSP_ERROR; tx_buf[1] <= ERR_ACCESS; tn <= 8'd2;
                  ci <= '0; crc_q <= CRC_PRESET; st <= D_CRC;
                end else if (lock_bits[rb(p)[5:0]]) begin
                  tx_buf[0] <= RSP_ERROR; tx_buf[1] <= ERR_LOCKED; tn <= 8'd2;
                  ci <= '0; crc_q <= CRC_PRESET; st <= D_CRC;
                end else begin
                  mem_valid <= 1'b1;
                  mem_req.we <= 1'b1;
                  if (rb(p)[5]) begin
                    mem_req.addr  <= blk_t'(BLK_LOCK1);
                    mem_req.wdata <= lock_bits[63:32] | (32'd1 << rb(p)[4:0]);
                  end else begin
                    mem_req.addr  <= blk_t'(BLK_LOCK0);
                    mem_req.wdata <= lock_bits[31:0] | (32'd1 << rb(p)[4:0]);
                  end
                  st <= D_WR_WAIT;
                end
              end
              CMD_WRITE_AFI: begin
                if (afi_lock) begin
                  tx_buf[0] <= RSP_ERROR; tx_buf[1] <= ERR_LOCKED; tn <= 8'd2;
                  ci <= '0; crc_q <= CRC_PRESET; st <= D_CRC;
                end else begin
                  mem_valid <= 1'b1;
                  mem_req   <= '{we: 1'b1, addr: blk_t'(BLK_CONFIG),
                                 wdata: {15'd0, afi_lock, dsfid, rb(p)}};
                  st <= D_WR_WAIT;
                end
              end
              CMD_AUTH1: begin
                auth_level <= AUTH_NONE;
                auth_pend  <= 1'b0;
                if (rb(p) > 8'd3) begin
                  tx_buf[0] <= RSP_ERROR; tx_buf[1] <= ERR_ACCESS; tn <= 8'd2;
                  ci <= '0; crc_q <= CRC_PRESET; st <= D_CRC;
                end else begin
                  pend_lvl <= auth_e'({1'b0, rb(p)[1:0]} + 3'd1);
                  rnd_req  <= 1'b1;
                  st <= D_RNG;
                end
              end
              CMD_AUTH2: begin
                rrn_q <= {rb(p+8'd5), rb(p+8'd4), rb(p+8'd3), rb(p+8'd2), rb(p+8'd1), rb(p)};
                tf_q  <= {rb(p+8'd11), rb(p+8'd10), rb(p+8'd9), rb(p+8'd8), rb(p+8'd7), rb(p+8'd6)};
                if (auth_pend) st <= D_AUTH2;
                else begin
                  tx_buf[0] <= RSP_ERROR; tx_buf[1] <= ERR_ACCESS; tn <= 8'd2;
                  ci <= '0; crc_q <= CRC_PRESET; st <= D_CRC;
                end
              end
              default: ev_drop <= 1'b1;   // not supported: dropped
            endcase
          end
        end

        // ---------------- read multiple blocks ----------------
        D_RD_REQ: begin
          if (!can_read(blk, auth_level, secure)) begin
            tx_buf[0] <= RSP_ERROR; tx_buf[1] <= ERR_ACCESS; tn <= 8'd2;
            ci <= '0; crc_q <= CRC_PRESET; st <= D_CRC;
          end else begin
            mem_valid <= 1'b1;
            mem_req   <= '{we: 1'b0, addr: blk, wdata: '0};
            st <= D_RD_WAIT;
          end
        end
        D_RD_WAIT: if (mem_ack) begin
          mem_valid <= 1'b0;
          if (opt) begin
            tx_buf[TW'(tn)] <= {7'd0, lock_bits[blk]};
            for (int i = 0; i < 4; i++) tx_buf[TW'(tn + 8'd1 + 8'(i))] <= mem_rdata[8*i +: 8];
            tn <= tn + 8'd5;
          end else begin
            for (int i = 0; i < 4; i++) tx_buf[TW'(tn + 8'(i))] <= mem_rdata[8*i +: 8];
            tn <= tn + 8'd4;
          end
          blk   <= blk + 6'd1;
          nleft <= nleft - 8'd1;
          if (nleft == 8'd1) begin
            ci <= '0; crc_q <= CRC_PRESET; st <= D_CRC;
          end else st <= D_RD_REQ;
        end

        // ---------------- write block / lock / AFI ----------------
        D_WR_WAIT: if (mem_ack) begin
          mem_valid <= 1'b0;
          if (mem_err) begin
            tx_buf[0] <= RSP_ERROR; tx_buf[1] <= ERR_LOCKED; tn <= 8'd2;
          end
          ci <= '0; crc_q <= CRC_PRESET; st <= D_CRC;
        end

        // ---------------- authentication ----------------
        D_RNG: if (rnd_valid) begin
          trn_q  <= rnd;
          key_hi <= 1'b0;
          st     <= D_KEY_REQ;
        end
        D_KEY_REQ: begin
          mem_valid <= 1'b1;
          mem_req   <= '{we: 1'b0, addr: key_block(pend_lvl) + blk_t'(key_hi), wdata: '0};
          st <= D_KEY_WAIT;
        end
        D_KEY_WAIT: if (mem_ack) begin
          mem_valid <= 1'b0;
          if (!key_hi) begin
            key_q[31:0] <= mem_rdata;
            key_hi <= 1'b1;
            st <= D_KEY_REQ;
          end else begin
            key_q[47:32] <= mem_rdata[15:0];
            auth_pend <= 1'b1;
            for (int i = 0; i < 6; i++) tx_buf[1+i] <= trn_q[8*i +: 8];
            tn <= 8'd7;
            ci <= '0; crc_q <= CRC_PRESET; st <= D_CRC;
          end
        end
        D_AUTH2: begin
          // sf_tf / sf_rf now reflect (TRN, RRN, key)
          auth_pend <= 1'b0;
          if (sf_tf == tf_q) begin
            auth_level <= pend_lvl;
            for (int i = 0; i < 6; i++) tx_buf[1+i] <= sf_rf[8*i +: 8];
            tn <= 8'd7;
          end else begin
            auth_level <= AUTH_NONE;
            tx_buf[0] <= RSP_ERROR; tx_buf[1] <= ERR_ACCESS; tn <= 8'd2;
          end
          ci <= '0; crc_q <= CRC_PRESET; st <= D_CRC;
        end

        // ---------------- response CRC, reply delay, send ----------------
        D_CRC: begin
          if (ci < tn) begin
            crc_q <= crc16_byte(crc_q, tx_buf[ci[TW-1:0]]);
            ci <= ci + 8'd1;
          end else begin
            sf_crc <= ~crc_q;
            st <= D_SIGN;
          end
        end
        D_SIGN: begin
          tx_buf[TW'(tn)]        <= secure ? sf_sig[7:0]  : sf_crc[7:0];
          tx_buf[TW'(tn + 8'd1)] <= secure ? sf_sig[15:8] : sf_crc[15:8];
          tx_len <= tn + 8'd2;
          st <= D_T1;
        end
        D_T1: if (t1cnt >= 16'(T1_CYCLES)) begin
          tx_start <= 1'b1;
          ev_resp  <= 1'b1;
          st <= D_TX;
        end
        D_TX: if (!tx_start && !tx_busy) st <= D_IDLE;

        default: st <= D_IDLE;
      endcase
    end
  end

  // a response is started only when the modulator is free
  a_tx_free: assert property (@(posedge clk) disable iff (!rst_n) tx_start |-> !tx_busy);
endmodule
