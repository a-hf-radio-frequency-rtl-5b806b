// rfid_pkg: types, constants and helper functions shared by the HF RFID tag
// digital controller.
//
// Holds the command codes of the tag (ISO/IEC 15693 commands plus four
// custom secure commands), the request-flag bit positions, the response error
// codes, the EEPROM memory map, the access-rights rules and the CRC16 used on
// every frame. The command codes are the ones of the design's command table;
// the memory map, the key-to-area assignment and the secure-command layouts
// are this design's own choices, since only the existence of the areas and
// keys is fixed.
package rfid_pkg;

  // ------------------------------------------------------------------
  // Clock figures (13.56 MHz carrier, sample clock = carrier / 4)
  // ------------------------------------------------------------------
  localparam int unsigned SAMPLE_DIV   = 4;   // base clock -> sample clock
  localparam int unsigned UNIT_SAMPLES = 32;  // one 9.44 us modulation time

  // ------------------------------------------------------------------
  // Command codes
  // ------------------------------------------------------------------
  typedef enum logic [7:0] {
    CMD_INVENTORY     = 8'h01,  // also EAS alarm inventory (AFI = EAS_AFI)
    CMD_STAY_QUIET    = 8'h02,
    CMD_WRITE_BLOCK   = 8'h21,
    CMD_LOCK_BLOCK    = 8'h22,
    CMD_READ_MULTI    = 8'h23,
    CMD_SELECT        = 8'h25,
    CMD_RESET_READY   = 8'h26,
    CMD_WRITE_AFI     = 8'h27,  // also set / reset EAS (AFI based)
    CMD_AUTH1         = 8'hF0,
    CMD_AUTH2         = 8'hF1,
    CMD_WRITE_SECURE  = 8'hF2,
    CMD_READ_MULTI_SEC= 8'hF3
  } cmd_e;

  // Request flag bits (bit 1 of the standard is index 0 here)
  localparam int FLG_SUBCARRIER = 0;  // 1: two subcarriers (423/484 kHz)
  localparam int FLG_DATA_RATE  = 1;  // 1: fast data rate
  localparam int FLG_INVENTORY  = 2;
  localparam int FLG_SELECT     = 4;  // inventory: AFI flag
  localparam int FLG_ADDRESS    = 5;  // inventory: 1 = one slot, 0 = 16 slots
  localparam int FLG_OPTION     = 6;

  // Response flags / error codes
  localparam logic [7:0] RSP_OK          = 8'h00;
  localparam logic [7:0] RSP_ERROR       = 8'h01;
  localparam logic [7:0] ERR_NOT_AVAIL   = 8'h10;  // block not available
  localparam logic [7:0] ERR_LOCKED      = 8'h12;  // block / AFI locked
  localparam logic [7:0] ERR_ACCESS      = 8'h0F;  // no access right / auth failed

  // Tag states
  typedef enum logic [1:0] {
    ST_READY    = 2'd0,
    ST_QUIET    = 2'd1,
    ST_SELECTED = 2'd2
  } tag_state_e;

  // Authentication levels (user access rights)
  typedef enum logic [2:0] {
    AUTH_NONE  = 3'd0,  // free-user access
    AUTH_SUPER = 3'd1,  // super-user access
    AUTH_USER0 = 3'd2,  // normal-user access, area 0
    AUTH_USER1 = 3'd3,
    AUTH_USER2 = 3'd4
  } auth_e;

  // ------------------------------------------------------------------
  // EEPROM: 2 kbit = 64 blocks of 32 bits
  // ------------------------------------------------------------------
  localparam int unsigned NBLOCKS = 64;
  typedef logic [5:0]  blk_t;
  typedef logic [31:0] word_t;

  localparam int unsigned BLK_UID0    = 0;   // UID[31:0]
  localparam int unsigned BLK_UID1    = 1;   // UID[63:32]
  localparam int unsigned BLK_CONFIG  = 2;   // [7:0] AFI, [15:8] DSFID, [16] AFI lock
  localparam int unsigned BLK_LOCK0   = 3;   // lock bits of blocks 0..31
  localparam int unsigned BLK_LOCK1   = 4;   // lock bits of blocks 32..63
  localparam int unsigned BLK_KEY0    = 6;   // super key, user keys 0..2: two blocks each
  localparam int unsigned BLK_MASTER  = 14;  // 14..19 reserved for the two 96-bit master keys
  localparam int unsigned BLK_AREA0   = 20;  // user area k: 20+8k .. 27+8k
  localparam int unsigned AREA_BLOCKS = 8;
  localparam int unsigned BLK_FREE    = 44;  // free user area 44..63

  // Memory request from the data flow to the memory controller
  typedef struct packed {
    logic  we;
    blk_t  addr;
    word_t wdata;
  } mem_req_t;

  // EEPROM interface operations (memory controller -> EEPROM controller)
  typedef enum logic [1:0] {
    EE_READ  = 2'd0,
    EE_ERASE = 2'd1,
    EE_PROG  = 2'd2
  } ee_op_e;

  // ------------------------------------------------------------------
  // Access rights
  // ------------------------------------------------------------------
  // Key blocks of an authentication level
  function automatic blk_t key_block(input auth_e lvl);
    return blk_t'(BLK_KEY0 + 2 * (int'(lvl) - 1));
  endfunction

  function automatic logic in_area(input blk_t b, input int unsigned k);
    return (int'(b) >= BLK_AREA0 + AREA_BLOCKS * k) &&
           (int'(b) <  BLK_AREA0 + AREA_BLOCKS * (k + 1));
  endfunction

  // secure = 0: standard commands (free-user access)
  function automatic logic can_read(input blk_t b, input auth_e lvl, input logic secure);
    logic ok;
    ok = (int'(b) <= BLK_LOCK1) || (int'(b) >= BLK_FREE);
    if (secure) begin
      case (lvl)
        AUTH_SUPER: ok = ok || (int'(b) >= BLK_AREA0);
        AUTH_USER0: ok = ok || in_area(b, 0);
        AUTH_USER1: ok = ok || in_area(b, 1);
        AUTH_USER2: ok = ok || in_area(b, 2);
        default:    ok = 1'b0;
      endcase
    end
    return ok;
  endfunction

  function automatic logic can_write(input blk_t b, input auth_e lvl, input logic secure);
    logic ok;
    ok = (int'(b) >= BLK_FREE);
    if (secure) begin
      case (lvl)
        AUTH_SUPER: ok = ok || (int'(b) >= BLK_AREA0) ||
                         (int'(b) >= BLK_KEY0 && int'(b) < BLK_MASTER);
        AUTH_USER0: ok = ok || in_area(b, 0);
        AUTH_USER1: ok = ok || in_area(b, 1);
        AUTH_USER2: ok = ok || in_area(b, 2);
        default:    ok = 1'b0;
      endcase
    end
    return ok;
  endfunction

  // ------------------------------------------------------------------
  // CRC16 (ISO/IEC 13239): reflected polynomial 0x8408, preset 0xFFFF,
  // the frame carries the ones' complement, low byte first.
  // ------------------------------------------------------------------
  localparam logic [15:0] CRC_PRESET = 16'hFFFF;
  localparam logic [15:0] CRC_POLY   = 16'h8408;

  function automatic logic [15:0] crc16_byte(input logic [15:0] crc, input logic [7:0] b);
    logic [15:0] c;
    c = crc ^ {8'h00, b};
    for (int i = 0; i < 8; i++)
      c = c[0] ? ((c >> 1) ^ CRC_POLY) : (c >> 1);
    return c;
  endfunction

endpackage
