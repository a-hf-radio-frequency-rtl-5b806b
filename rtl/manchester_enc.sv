// manchester_enc: tag-to-reader modulator (Manchester coding on a load
// modulated subcarrier).
//
// A response frame is a sequence of half-bit "chips", each either
// modulated (M) or unmodulated (U). Logic 0 is M then U, logic 1 is U then M,
// bytes go least significant bit first. SOF is U U U M M M followed by a
// logic 1, EOF is a logic 0 followed by M M M U U U (ISO/IEC 15693-2).
// With one subcarrier, M is the 423.75 kHz subcarrier (13.56 MHz / 32) and U
// is no modulation. With two subcarriers, M is 423.75 kHz and U is 484.28 kHz
// (13.56 MHz / 28). A chip lasts 8 subcarrier periods of 423.75 kHz (9 of
// 484.28 kHz) at the fast data rate (26.48 kbit/s) and four times as many at
// the low rate (6.62 kbit/s). The two subcarriers, Manchester coding and the
// two data rates are the design's; the chip patterns and period counts are
// the standard's, and the byte handshake is this implementation's.
//
// Interface: start (one clk) begins a frame with the given dual_sub / fast
// settings. Bytes are taken with a valid/ready handshake (byte_ready is high
// for the one cycle a byte is taken); if no byte is valid when the next one
// is due, the EOF is sent. mod_o drives the load modulator. busy is high from
// start to the end of the EOF; done pulses once after it.
//
// Timing: fast rate, one subcarrier: one bit = 512 clk (37.76 us); SOF and
// EOF = 2048 clk each. The first chip starts the cycle after start.
module manchester_enc (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       dual_sub,
  input  logic       fast,
  input  logic       byte_valid,
  input  logic [7:0] byte_i,
  output logic       byte_ready,
  output logic       mod_o,
  output logic       busy,
  output logic       done
);
  localparam logic [7:0] SOF_CHIPS = 8'b1011_1000;  // sent from bit 0: U U U M M M U M
  localparam logic [7:0] EOF_CHIPS = 8'b0001_1101;  // sent from bit 0: M U M M M U U U

  typedef enum logic [1:0] {PH_IDLE, PH_SOF, PH_DATA, PH_EOF} phase_e;
  phase_e phase;

  logic        dual_q, fast_q;
  logic [15:0] chips;      // chips still to send, next at bit 0
  logic [4:0]  nchip;      // chips left in this group
  logic [10:0] tcnt;       // clk cycles left in this chip
  logic [4:0]  scnt;       // position in the subcarrier period
  logic        cur_m;      // this chip is modulated

  // chip length in clk cycles
  function automatic logic [10:0] chip_len(input logic m, input logic dual, input logic fst);
    logic [10:0] base;
    base = (dual && !m) ? 11'd252 : 11'd256;
    return fst ? base : {base[8:0], 2'b00};
  endfunction

  // Manchester chips of one byte, LSB first: 0 -> M U, 1 -> U M
  function automatic logic [15:0] byte_chips(input logic [7:0] b);
    logic [15:0] c;
    for (int i = 0; i < 8; i++) c[2*i +: 2] = b[i] ? 2'b10 : 2'b01;
    return c;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin : seq
    logic        next_m;
    logic        load;
    next_m = 1'b0;
    load   = 1'b0;
    if (!rst_n) begin
      phase <= PH_IDLE; dual_q <= 1'b0; fast_q <= 1'b1;
      chips <= '0; nchip <= '0; tcnt <= '0; scnt <= '0; cur_m <= 1'b0;
      mod_o <= 1'b0; busy <= 1'b0; done <= 1'b0; byte_ready <= 1'b0;
    end else begin
      done       <= 1'b0;
      byte_ready <= 1'b0;
      if (phase == PH_IDLE) begin
        mod_o <= 1'b0;
        if (start) begin
          phase  <= PH_SOF;
          dual_q <= dual_sub;
          fast_q <= fast;
          busy   <= 1'b1;
          chips  <= {8'h00, SOF_CHIPS};
          nchip  <= 5'd8;
          tcnt   <= '0;
        end
      end else begin
        // subcarrier waveform inside the current chip
        if (cur_m || dual_q) begin
          if (cur_m) mod_o <= (scnt < 5'd16);
          else       mod_o <= (scnt < 5'd14);
          scnt <= (scnt == (cur_m ? 5'd31 : 5'd27)) ? 5'd0 : scnt + 5'd1;
        end else mod_o <= 1'b0;

        if (tcnt <= 11'd1) begin
          // chip over: take the next one
          if (nchip == 5'd0) begin
            case (phase)
              PH_SOF, PH_DATA: begin
                if (byte_valid) begin
                  byte_ready <= 1'b1;
                  chips  <= byte_chips(byte_i) >> 1;
                  nchip  <= 5'd15;
                  next_m = byte_chips(byte_i)[0];
                  load   = 1'b1;
                  phase  <= PH_DATA;
                end else begin
                  chips  <= {8'h00, EOF_CHIPS >> 1};
                  nchip  <= 5'd7;
                  next_m = EOF_CHIPS[0];
                  load   = 1'b1;
                  phase  <= PH_EOF;
                end
              end
              default: begin
                phase <= PH_IDLE;
                busy  <= 1'b0;
                done  <= 1'b1;
                mod_o <= 1'b0;
              end
            endcase
          end else begin
            next_m = chips[0];
            chips  <= chips >> 1;
            nchip  <= nchip - 5'd1;
            load   = 1'b1;
          end
          if (load) begin
            cur_m <= next_m;
            tcnt  <= chip_len(next_m, dual_q, fast_q);
            scnt  <= '0;
          end
        end else tcnt <= tcnt - 11'd1;
      end
    end
  end
endmodule
