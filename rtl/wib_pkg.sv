// Shared types and constants of the WIB data path.
//
// The COLDDATA link format: every convert (500 ns) each ASIC sends a 56-word
// packet on a pair of 8b10b links, link A carrying the low byte and link B the
// high byte of each 16-bit word. Word 1 is K28.5 (start of frame), words 2-3 the
// per-link checksums, 4 a time stamp, 5 errors, 6 reserved, 7-8 the 4-bit
// stream headers, 9-56 the eight 96-bit streams; four K28.1 idle characters
// follow, so one convert period is 60 characters at 120 MHz.
//
// The WIB output is a GBT wide-mode frame of 120 bits at 40 MHz: 4 header bits,
// 4 slow-control bits and 112 user bits (80 D + 32 ED). One convert period holds
// 20 frames: WIB header, 8 frames per ASIC, trailer and 2 idle frames.
//
// The K-character values, the GBT header codes (0101 data, 0110 idle) and the
// CRC-32 used in the trailer are this design's choices from common practice.
package wib_pkg;

  localparam logic [7:0] K28_5 = 8'hBC;  // start of frame
  localparam logic [7:0] K28_1 = 8'h3C;  // idle

  localparam int CD_PKT_WORDS   = 56;   // words per ASIC packet, K28.5 included
  localparam int CD_IDLE_WORDS  = 4;    // K28.1 characters after a packet
  localparam int CD_LAST_WORD   = 56;
  localparam int CD_CHK_FIRST   = 4;    // first word covered by the checksum

  localparam int FRAME_BYTES      = 14;  // GBT wide-mode user bytes per frame
  localparam int WORDS_PER_FRAME  = 7;
  localparam int FRAMES_PER_ASIC  = 8;   // 112 bytes per ASIC packet
  localparam int CLK_PER_FRAME    = 3;   // 120 MHz characters, 40 MHz frames

  localparam logic [3:0] GBT_H_DATA = 4'b0101;
  localparam logic [3:0] GBT_H_IDLE = 4'b0110;
  localparam logic [7:0] WIB_HDR_ID = 8'hA5;
  localparam logic [15:0] ASIC_HDR_ID = 16'hBCBC;

  // One decoded 8b10b character.
  typedef struct packed {
    logic       k;
    logic [7:0] d;
  } cd_char_t;

  // One packet byte of one link, as the framer hands it on.
  typedef struct packed {
    logic       first;    // word 2 of the packet
    logic       last;     // word 56 of the packet
    logic       chk_err;  // valid with last: checksum mismatch
    logic       frm_err;  // valid with last: truncated packet or stray characters
    logic [7:0] d;
  } link_byte_t;

  // Timing counters latched at a convert command.
  typedef struct packed {
    logic [55:0] ts;
    logic [23:0] reset_cnt;
    logic [15:0] conv_cnt;
    logic        err;        // convert count overflowed without a sync
  } conv_rec_t;

  // Per-packet status of one ASIC, known when its last word is packed, with
  // the convert record that was current when the packet's K28.5 arrived.
  typedef struct packed {
    conv_rec_t rec;
    logic chk_err_a;
    logic chk_err_b;
    logic frm_err;
    logic ovf;
  } pkt_status_t;

  typedef logic [8*FRAME_BYTES-1:0] payload_t;

  typedef struct packed {
    logic [3:0] h;
    logic [3:0] sc;
    payload_t   user;
  } gbt_frame_t;

  // CRC-32 (polynomial 04C11DB7, MSB first, not reflected) over 112 bits.
  function automatic logic [31:0] crc32_step(input logic [31:0] crc, input payload_t data);
    logic [31:0] c;
    c = crc;
    for (int i = $bits(payload_t) - 1; i >= 0; i--) begin
      if (c[31] ^ data[i]) c = {c[30:0], 1'b0} ^ 32'h04C1_1DB7;
      else                 c = {c[30:0], 1'b0};
    end
    return c;
  endfunction

endpackage
