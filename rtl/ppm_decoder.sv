// ppm_decoder: data detection of the reader-to-tag link (1/4 and 1/256
// pulse position coding, 100 % ASK).
//
// The reader sends a value by the position of one 9.44 us carrier pause
// (a "modulation") in a frame of 4 or 256 slots of 18.88 us; the pause sits in
// the second half of its slot. Sampling runs at the sample clock
// (13.56 MHz / 4, 32 samples per 9.44 us). During a pause the tag has no
// clock, so the 14-bit detection counter only counts while the carrier is
// present (ce_rx). The counter is split into a 5-bit unit part (one
// modulation time) and a 9-bit half-data part (half slots); a whole frame is
// 64*N - 32 counted steps (16352 for 1/256, 224 for 1/4).
//
// The value of a pulse is taken at its rising edge (end of the pause) and
// loaded at the end of the detection period. The counter is not resynchronised
// at that edge. Instead the phase error seen at the edge (the unit part,
// ideally 0, range -16..+15 samples, i.e. up to 4.72 us) is kept and applied at
// the end of the period: a counter that ran ahead is held at 0 for that many
// steps, one that lagged restarts at the lag. Errors from the analog edge
// delays therefore do not pile up from frame to frame.
//
// Special case: when the last slot (0xFF, or 3 in 1/4 mode) is sent and the
// counter runs ahead, the period ends before that pause is over and the pause
// shows up at the very start of the next period. A status bit (pend) records
// a period that ended with no pulse; a pause ending in the first 16 steps of
// the next period is then taken as the last-slot value of the previous
// period and the counter is realigned to its edge. If instead those 16 steps
// pass quietly, the request has ended.
//
// Framing (SOF/EOF) follows ISO/IEC 15693-2: SOF = pause, 28.32 us (1/256) or
// 47.2 us (1/4) of carrier, pause, 9.44 us of carrier; EOF = a pause in the
// second half of the first slot. The EOF is therefore decoded as a symbol 0;
// symbols are passed on one behind so that the last one, the EOF, is dropped.
// In 1/4 mode four symbols make one byte, least significant pair first.
// The counter organisation, the end-of-period correction and the last-slot
// status bit follow the design; the SOF tolerance windows (+-16 samples), the
// exact correction rule and the framing checks are this implementation's.
//
// Interface: carrier_i is the demodulated field (1 = carrier). Outputs are
// one-clk pulses: sof (with mode256), byte_valid/byte_o, frame_end (request
// complete, EOF seen), frame_err (timing failure; the request is dropped),
// corr_evt (a nonzero phase correction applied), late_evt (last-slot pause
// recovered from the next period).
module ppm_decoder
  import rfid_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce_sample,
  input  logic       ce_rx,
  input  logic       carrier_i,
  output logic       sof,
  output logic       mode256,
  output logic       byte_valid,
  output logic [7:0] byte_o,
  output logic       frame_end,
  output logic       frame_err,
  output logic       corr_evt,
  output logic       late_evt
);
  localparam int unsigned SOF_GAP256 = 3 * UNIT_SAMPLES;  // 28.32 us
  localparam int unsigned SOF_GAP4   = 5 * UNIT_SAMPLES;  // 47.2 us
  localparam int unsigned SOF_TOL    = 16;
  localparam int unsigned MAX_PAUSE  = 2 * UNIT_SAMPLES;
  localparam int unsigned LATE_WIN   = UNIT_SAMPLES / 2;  // 4.72 us

  typedef enum logic [2:0] {S_IDLE, S_SOF1, S_SOFGAP, S_SOF2, S_DATA} state_e;
  state_e state;

  logic [13:0] cnt;         // {half[8:0], unit[4:0]}
  logic [5:0]  hold;        // steps to wait before counting (correction)
  logic        car_q;
  logic        got;         // a pulse was seen in this period
  logic        pend;        // the last period ended with no pulse
  logic [7:0]  sym;         // value of this period's pulse
  logic signed [5:0] dphase;  // counter phase error at that pulse
  logic        hv;          // a held (not yet passed on) symbol exists
  logic [7:0]  hsym;
  logic [1:0]  npair;       // 1/4 mode: symbols in the byte being built
  logic [5:0]  acc;         // earlier pairs, newest at the top

  wire rise = ce_sample &  carrier_i & ~car_q;
  wire fall = ce_sample & ~carrier_i &  car_q;
  wire [13:0] pend_cnt = mode256 ? 14'd16351 : 14'd223;   // 64*N - 32 - 1
  wire [13:0] cpos     = cnt - 14'd16;                    // position rounded to slots
  wire [7:0]  pos_slot = mode256 ? cpos[13:6] : {6'd0, cpos[7:6]};

  always_ff @(posedge clk or negedge rst_n) begin : seq
    logic       do_push;
    logic [7:0] push_s;
    do_push = 1'b0;
    push_s  = '0;
    if (!rst_n) begin
      state <= S_IDLE;
      cnt <= '0; hold <= '0; car_q <= 1'b1;
      got <= 1'b0; pend <= 1'b0; sym <= '0; dphase <= '0;
      hv <= 1'b0; hsym <= '0; npair <= '0; acc <= '0;
      mode256 <= 1'b0;
      sof <= 1'b0; byte_valid <= 1'b0; byte_o <= '0;
      frame_end <= 1'b0; frame_err <= 1'b0; corr_evt <= 1'b0; late_evt <= 1'b0;
    end else begin
      sof <= 1'b0; byte_valid <= 1'b0; frame_end <= 1'b0; frame_err <= 1'b0;
      corr_evt <= 1'b0; late_evt <= 1'b0;
      if (ce_sample) car_q <= carrier_i;

      case (state)
        S_IDLE: if (fall) begin
          cnt   <= '0;
          state <= S_SOF1;
        end

        S_SOF1, S_SOF2: begin
          if (ce_sample) cnt <= cnt + 14'd1;
          if (rise) begin
            cnt <= '0;
            if (state == S_SOF1) state <= S_SOFGAP;
            else begin
              // 9.44 us of carrier closes the SOF, then the first period
              state <= S_DATA;
              hold  <= 6'(UNIT_SAMPLES);
              got <= 1'b0; pend <= 1'b0; hv <= 1'b0; npair <= '0;
              sof <= 1'b1;
            end
          end else if (ce_sample && cnt > 14'(MAX_PAUSE)) state <= S_IDLE;
        end

        S_SOFGAP: begin
          if (ce_rx) cnt <= cnt + 14'd1;
          if (fall) begin
            cnt <= '0;
            if (cnt >= 14'(SOF_GAP256 - SOF_TOL) && cnt < 14'(SOF_GAP256 + SOF_TOL)) begin
              mode256 <= 1'b1; state <= S_SOF2;
            end else if (cnt >= 14'(SOF_GAP4 - SOF_TOL) && cnt < 14'(SOF_GAP4 + SOF_TOL)) begin
              mode256 <= 1'b0; state <= S_SOF2;
            end else state <= S_SOF1;   // this pause may start a real SOF
          end else if (ce_rx && cnt > 14'(SOF_GAP4 + SOF_TOL)) state <= S_IDLE;
        end

        S_DATA: begin
          if (rise) begin
            if (hold != '0 || cnt < 14'(LATE_WIN)) begin
              // pause ending at the start of the period
              if (pend) begin
                do_push = 1'b1; push_s = mode256 ? 8'hFF : 8'h03;
                pend     <= 1'b0;
                late_evt <= 1'b1;
                cnt  <= '0;     // its edge is the true period start
                hold <= '0;
              end else begin
                frame_err <= 1'b1; state <= S_IDLE;
              end
            end else if (cpos[5] || got) begin
              // pause in the first half of a slot, or a second pause
              frame_err <= 1'b1; state <= S_IDLE;
            end else begin
              got    <= 1'b1;
              sym    <= pos_slot;
              dphase <= $signed({1'b0, cpos[4:0]}) - 6'sd16;
            end
          end else if (ce_rx) begin
            if (hold != '0) hold <= hold - 6'd1;
            else if (pend && cnt == 14'(LATE_WIN)) begin
              // a quiet period: the request is over; the held symbol is the EOF
              state <= S_IDLE;
              if (hv && hsym == 8'h00 && npair == 2'd0) frame_end <= 1'b1;
              else                                        frame_err <= 1'b1;
            end else if (cnt == pend_cnt) begin
              // end of the detection period: load the value, correct the counter
              if (got) begin
                do_push = 1'b1; push_s = sym;
                got <= 1'b0;
                if (dphase > 0) begin
                  hold <= 6'(dphase); cnt <= '0; corr_evt <= 1'b1;
                end else if (dphase < 0) begin
                  hold <= '0; cnt <= 14'(-dphase); corr_evt <= 1'b1;
                end else begin
                  cnt <= '0;
                end
              end else begin
                pend <= 1'b1;
                cnt  <= '0;
              end
            end else cnt <= cnt + 14'd1;
          end
        end

        default: state <= S_IDLE;
      endcase

      // pass a symbol on (one behind, so that the last one, the EOF, is dropped)
      if (do_push) begin
        if (hv) begin
          if (mode256) begin
            byte_valid <= 1'b1;
            byte_o     <= hsym;
          end else begin
            acc   <= {hsym[1:0], acc[5:2]};
            npair <= npair + 2'd1;
            if (npair == 2'd3) begin
              byte_valid <= 1'b1;
              byte_o     <= {hsym[1:0], acc};
            end
          end
        end
        hv   <= 1'b1;
        hsym <= push_s;
      end
    end
  end
endmodule
