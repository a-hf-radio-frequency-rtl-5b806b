// crc16: byte-serial CRC16 generator / checker (ISO/IEC 13239).
//
// Every request and response frame ends with a CRC16 over its flags, command
// and data. The register is preset to 0xFFFF by init and takes one byte per
// clock when en is high (reflected polynomial 0x8408, least significant bit
// first). crc_o is the ones' complement of the register: the value sent in a
// frame, low byte first. That the frames carry a CRC16 is the design's; the
// polynomial, preset and complement are those of the ISO/IEC 15693 air
// interface the design is compatible with.
//
// Timing: crc_o reflects all bytes accepted up to the previous clock edge;
// init has priority over en.
module crc16
  import rfid_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        en,
  input  logic [7:0]  data,
  output logic [15:0] crc_o
);
  logic [15:0] crc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    crc_q <= CRC_PRESET;
    else if (init) crc_q <= CRC_PRESET;
    else if (en)   crc_q <= crc16_byte(crc_q, data);
  end

  assign crc_o = ~crc_q;
endmodule
