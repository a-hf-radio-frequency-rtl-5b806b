// eeprom_array: behavioural model of the 2-kbit EEPROM array with its analog
// driver (high-voltage pump, row drivers, sense amplifiers).
//
// This is a behavioural model of an analog macro, not logic to synthesise:
// the real part is a floating-gate array driven by a charge pump. The model
// keeps 64 words of 32 bits. hv_ok rises HV_RAMP cycles after hv_en. An erase
// pulse (erase high with hv_ok) of at least MIN_PULSE cycles clears the
// addressed word to all zeros when it ends; a program pulse of the same length
// sets the bits of din that are 1 (bits can only be set by programming). A
// read presents the word on dout once read_en has been high T_SENSE cycles;
// before that dout is zero. A pulse that is too short, or given without
// high voltage, changes nothing.
//
// The array size (2 kbit, 32-bit blocks) follows the design; the pulse
// and ramp times and the initial contents (the UID, the super key and the
// three user keys, written at manufacture) are this model's own.
module eeprom_array
  import rfid_pkg::*;
#(
  parameter int unsigned HV_RAMP   = 1356,   // 100 us at 13.56 MHz
  parameter int unsigned MIN_PULSE = 13560,  // 1 ms
  parameter int unsigned T_SENSE   = 4,
  parameter logic [63:0] INIT_UID  = 64'hE004_0100_1234_5678,
  parameter logic [47:0] SUPER_KEY = 48'h5EC0_0000_0001,
  parameter logic [47:0] USER_KEY0 = 48'hA0A0_0000_0010,
  parameter logic [47:0] USER_KEY1 = 48'hA1A1_0000_0011,
  parameter logic [47:0] USER_KEY2 = 48'hA2A2_0000_0012
) (
  input  logic  clk,
  input  logic  hv_en,
  output logic  hv_ok,
  input  blk_t  row,
  input  word_t din,
  input  logic  erase,
  input  logic  prog,
  input  logic  read_en,
  output word_t dout
);
  word_t mem [NBLOCKS];
  int unsigned hv_cnt, p_cnt, r_cnt;
  logic erase_q, prog_q;

  initial begin
    hv_cnt = 0; p_cnt = 0; r_cnt = 0;
    erase_q = 1'b0; prog_q = 1'b0;
    for (int i = 0; i < NBLOCKS; i++) mem[i] = '0;
    mem[BLK_UID0]      = INIT_UID[31:0];
    mem[BLK_UID1]      = INIT_UID[63:32];
    mem[BLK_KEY0 + 0]  = SUPER_KEY[31:0];
    mem[BLK_KEY0 + 1]  = {16'h0, SUPER_KEY[47:32]};
    mem[BLK_KEY0 + 2]  = USER_KEY0[31:0];
    mem[BLK_KEY0 + 3]  = {16'h0, USER_KEY0[47:32]};
    mem[BLK_KEY0 + 4]  = USER_KEY1[31:0];
    mem[BLK_KEY0 + 5]  = {16'h0, USER_KEY1[47:32]};
    mem[BLK_KEY0 + 6]  = USER_KEY2[31:0];
    mem[BLK_KEY0 + 7]  = {16'h0, USER_KEY2[47:32]};
  end

  assign hv_ok = hv_en && (hv_cnt >= HV_RAMP);
  assign dout  = (read_en && r_cnt >= T_SENSE) ? mem[row] : '0;

  always @(posedge clk) begin
    hv_cnt  <= hv_en ? ((hv_cnt < HV_RAMP) ? hv_cnt + 1 : hv_cnt) : 0;
    r_cnt   <= read_en ? ((r_cnt < T_SENSE) ? r_cnt + 1 : r_cnt) : 0;
    erase_q <= erase;
    prog_q  <= prog;
    if ((erase || prog) && hv_ok) p_cnt <= p_cnt + 1;
    else if (!erase && !prog)     p_cnt <= 0;
    // the cell changes when a long enough pulse ends
    if (erase_q && !erase && p_cnt >= MIN_PULSE) mem[row] <= '0;
    if (prog_q  && !prog  && p_cnt >= MIN_PULSE) mem[row] <= mem[row] | din;
  end
endmodule
