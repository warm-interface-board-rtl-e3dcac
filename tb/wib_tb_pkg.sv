// Reference model shared by the WIB testbenches.
//
// Packet contents are a fixed function of an ASIC tag, a packet sequence
// number and the word number, so a checker can recompute any word without
// looking at the design. The checksums, payloads, header and CRC are worked
// out here from the format description, independently of the RTL.
package wib_tb_pkg;
  import wib_pkg::*;

  // Data word w (4..56) of packet seq of ASIC tag.
  function automatic logic [15:0] cd_data_word(input int tag, input int seq, input int w);
    int unsigned h;
    h = 32'(tag) * 32'd2654435761 ^ 32'(seq) * 32'd40503 ^ 32'(w) * 32'd9973;
    h = h ^ (h >> 13);
    return h[15:0];
  endfunction

  // Checksum of one link: lane 0 = link A (low bytes), 1 = link B (high bytes).
  function automatic logic [15:0] cd_checksum(input int tag, input int seq, input int lane);
    logic [15:0] s;
    s = 0;
    for (int w = 4; w <= 56; w++) begin
      logic [15:0] x;
      x = cd_data_word(tag, seq, w);
      s = s + ((lane == 0) ? {8'h00, x[7:0]} : {8'h00, x[15:8]});
    end
    return s;
  endfunction

  // Word w (2..56) as sent on the link pair.
  function automatic logic [15:0] cd_word(input int tag, input int seq, input int w);
    logic [15:0] ca, cb;
    ca = cd_checksum(tag, seq, 0);
    cb = cd_checksum(tag, seq, 1);
    if (w == 2) return {cb[7:0], ca[7:0]};
    if (w == 3) return {cb[15:8], ca[15:8]};
    return cd_data_word(tag, seq, w);
  endfunction

  // Payload j (0..7) of the packet in the GBT frames.
  function automatic payload_t exp_payload(input int tag, input int seq, input int j);
    payload_t p;
    p = '0;
    for (int s = 0; s < 7; s++) begin
      int w;
      w = 7 * j + 1 + s;          // position in the 56-word packet image
      if (w == 1) p[15:0] = 16'hBCBC;
      else        p[16*s +: 16] = cd_word(tag, seq, w);
    end
    return p;
  endfunction

  // CRC-32, MSB first, byte at a time, from byte 14 down to byte 1.
  function automatic logic [31:0] ref_crc(input logic [31:0] crc, input payload_t d);
    logic [31:0] c;
    c = crc;
    for (int b = 13; b >= 0; b--) begin
      c = c ^ {d[8*b +: 8], 24'h0};
      for (int k = 0; k < 8; k++)
        c = c[31] ? ((c << 1) ^ 32'h04C11DB7) : (c << 1);
    end
    return c;
  endfunction

endpackage
