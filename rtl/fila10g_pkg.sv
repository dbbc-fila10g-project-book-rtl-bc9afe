// fila10g_pkg: types and constants shared by the FiLa10G user logic.
//
// A VSI word from a port is {1PPS, Valid, 32-bit data}; port #1's 32:64
// input FIFO and the combined stream seen by the framer carry {1PPS,
// Valid, 64-bit data}. The configuration-bit layout, the register map and the Mark5B
// constants are defined here. The list of signals follows the design's
// software interface; the bit positions and addresses are this design's
// choice. The Mark5B header constants (sync word 0xABADDEED, 10000-byte
// payload) follow the published Mark5B frame format, and the VLBA CRC uses
// the polynomial x^16 + x^15 + x^2 + 1.
package fila10g_pkg;

  // One VSI-H port sample carried through an input FIFO.
  typedef struct packed {
    logic        pps;
    logic        valid;
    logic [31:0] data;
  } vsi_word_t;

  // Combined 64-bit stream (port #2 in the upper half in 2xVSI mode).
  typedef struct packed {
    logic        pps;
    logic        valid;
    logic [63:0] data;
  } vsi64_word_t;

  // Output formats selected by the 4-bit format field of the configuration.
  typedef enum logic [3:0] {
    FMT_MARK5B = 4'd0,
    FMT_MARK5C = 4'd1,
    FMT_VDIF   = 4'd2
  } out_format_e;

  // System configuration bits (software -> user logic).
  localparam int unsigned CFG_ARM     = 0;  // arm RTC for next 1PPS (write 1)
  localparam int unsigned CFG_MODE64  = 1;  // 0: 1xVSI 32-bit, 1: 2xVSI 64-bit
  localparam int unsigned CFG_FMT_LSB = 2;  // [5:2] output format
  localparam int unsigned CFG_HALT    = 6;  // global reset / halt of the data path
  localparam int unsigned CFG_TVG     = 7;  // test vector generator mode

  // System status bits (user logic -> software).
  localparam int unsigned ST_PPS_SYNC   = 0;  // 1PPS sync gained
  localparam int unsigned ST_LINK_UP    = 1;  // 10G link #1 up
  localparam int unsigned ST_FIFO0_OVF  = 2;  // VSI#1 input FIFO overflowed (sticky)
  localparam int unsigned ST_FIFO1_OVF  = 3;  // VSI#2 input FIFO overflowed (sticky)
  localparam int unsigned ST_FMT_BAD    = 4;  // selected output format not built
  localparam int unsigned ST_INVALID    = 5;  // a word with Valid low was framed (sticky)
  localparam int unsigned ST_SENDING    = 6;  // framer is emitting frames
  localparam int unsigned ST_PPS_MISAL  = 7;  // a 1PPS fell inside a frame (sticky)

  // Register map, 32-bit word addresses.
  localparam logic [3:0] REG_RTC_BASE   = 4'h0;  // W  base second for next 1PPS
  localparam logic [3:0] REG_RTC_NOW    = 4'h1;  // R  current RTC seconds
  localparam logic [3:0] REG_YEARS      = 4'h2;  // W  years since 2000 (8 bits)
  localparam logic [3:0] REG_CONFIG     = 4'h3;  // W  system configuration bits
  localparam logic [3:0] REG_STATUS     = 4'h4;  // R  system status bits
  localparam logic [3:0] REG_DEST_IP    = 4'h5;  // W  UDP/IP destination address
  localparam logic [3:0] REG_DEST_PORT  = 4'h6;  // W  UDP destination port (16 bits)
  localparam logic [3:0] REG_STATION    = 4'h7;  // W  station ID, two ASCII chars
  localparam logic [3:0] REG_REF_RATE   = 4'h8;  // W  reference clock rate in Hz
  localparam logic [3:0] REG_FRAMES     = 4'h9;  // R  frames sent
  localparam logic [3:0] REG_FRAME_SEC  = 4'hA;  // R  Unix second of the current frame
  localparam logic [3:0] REG_VDIF       = 4'hB;  // W  VDIF {log2 chans[19:15], bits-1[14:10], thread[9:0]}

  // VDIF field reset value: 16 channels of 2 bits, thread 0.
  localparam logic [19:0] VDIF_CFG_RESET = {5'd4, 5'd1, 10'd0};

  // Mark5B frame constants.
  localparam logic [31:0] MK5B_SYNC          = 32'hABAD_DEED;
  localparam int unsigned MK5B_PAYLOAD_BYTES = 10000;
  localparam int unsigned MK5B_PAYLOAD_WORDS = MK5B_PAYLOAD_BYTES / 8;  // 64-bit words

  // Unix day 0 (1970-01-01) expressed as a Modified Julian Date.
  localparam int unsigned MJD_UNIX_EPOCH = 40587;

  // VLBA time-code CRC: x^16 + x^15 + x^2 + 1, zero start value, fed MSB
  // first with the 48 time-code bits (JJJSSSSS then .SSSS).
  function automatic logic [15:0] vlba_crc16(input logic [47:0] bits);
    logic [15:0] crc;
    logic        fb;
    crc = '0;
    for (int i = 47; i >= 0; i--) begin
      fb  = crc[15] ^ bits[i];
      crc = {crc[14:0], 1'b0};
      if (fb) crc = crc ^ 16'h8005;
    end
    return crc;
  endfunction

endpackage
