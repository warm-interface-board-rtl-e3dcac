// Merges the two COLDDATA ASICs of one FEMB into one GBT wide-mode link.
//
// A convert period is 20 frames. Once both ASICs have a whole packet waiting
// (both status FIFOs non-empty), the builder sends, one frame per frame_ce:
//   frame 1      WIB header: 0xA5, error byte, convert count, reset count and
//                56-bit time stamp (bytes 1, 2, 3-4, 5-7, 8-14); the counters
//                are the convert record ASIC 1's receiver attached to its packet
//   frames 2-9   the eight payloads of ASIC 1
//   frames 10-17 the eight payloads of ASIC 2
//   frame 18     trailer: CRC-32 of the user bits of frames 1-17 in bytes
//                11-14, bytes 1-10 zero
//   frames 19-20 idle
// The two idle frames are dropped as soon as the next pair of packets is
// waiting, which lets a packet that started late catch up; when no packet is
// waiting, idle frames continue. Idle frames carry GBT header 0110 and zero
// user data; all others carry 0101. The slow-control bits pass slow_ctrl through.
//
// Error byte: bit 0/1/2 = ASIC 1 checksum A / checksum B / framing error,
// bits 3/4/5 the same for ASIC 2, bit 6 = convert count overflowed without a
// sync, bit 7 = data lost in a FIFO.
//
// Timing: frame and frame_valid are registered; frame_valid is high the clock
// after each frame_ce. Status entries are popped with the header, payloads one
// per data frame. The frame order and header fields follow the WIB data-format
// table; the GBT header codes, the trailer layout, the CRC and the error-bit
// assignment are this design's choices.
module wib_frame_builder
  import wib_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_ce,
  // from the two ASIC receivers (index 0 = ASIC 1)
  input  logic [1:0]  pkt_ready,
  input  pkt_status_t pkt_status [2],
  output logic [1:0]  status_pop,
  input  payload_t    chunk [2],
  input  logic [1:0]  chunk_empty,
  output logic [1:0]  chunk_pop,
  input  logic [3:0]  slow_ctrl,
  // GBT frame out
  output gbt_frame_t  frame,
  output logic        frame_valid,
  output logic        pkt_sent,      // pulse with the trailer
  output logic        idle_dropped   // pulse when a scheduled idle frame is skipped
);

  typedef enum logic [2:0] {S_WAIT, S_ASIC1, S_ASIC2, S_TRAILER, S_POST} state_t;

  state_t      state;
  logic [2:0]  fcnt;     // payload number within the ASIC
  logic [1:0]  post_cnt; // idle frames sent after the trailer
  logic [31:0] crc;

  logic start;
  assign start = (state == S_WAIT || state == S_POST) && (pkt_ready == 2'b11);

  logic [7:0] err_byte;
  assign err_byte = {pkt_status[0].ovf || pkt_status[1].ovf, pkt_status[0].rec.err,
                     pkt_status[1].frm_err, pkt_status[1].chk_err_b, pkt_status[1].chk_err_a,
                     pkt_status[0].frm_err, pkt_status[0].chk_err_b, pkt_status[0].chk_err_a};

  payload_t header_payload;
  assign header_payload = {pkt_status[0].rec.ts, pkt_status[0].rec.reset_cnt,
                           pkt_status[0].rec.conv_cnt, err_byte, WIB_HDR_ID};

  always_comb begin
    status_pop = '0;
    chunk_pop  = '0;
    if (frame_ce) begin
      if (start)               status_pop = 2'b11;
      if (state == S_ASIC1)    chunk_pop[0] = 1'b1;
      if (state == S_ASIC2)    chunk_pop[1] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_WAIT;
      fcnt         <= '0;
      post_cnt     <= '0;
      crc          <= '1;
      frame        <= '0;
      frame_valid  <= 1'b0;
      pkt_sent     <= 1'b0;
      idle_dropped <= 1'b0;
    end else begin
      frame_valid  <= frame_ce;
      pkt_sent     <= 1'b0;
      idle_dropped <= 1'b0;
      if (frame_ce) begin
        frame.sc <= slow_ctrl;
        frame.h  <= GBT_H_DATA;
        case (state)
          S_WAIT, S_POST: begin
            if (start) begin
              frame.user <= header_payload;
              crc        <= crc32_step('1, header_payload);
              fcnt       <= '0;
              state      <= S_ASIC1;
              if (state == S_POST) idle_dropped <= 1'b1;
            end else begin
              frame.h    <= GBT_H_IDLE;
              frame.user <= '0;
              if (state == S_POST) begin
                post_cnt <= post_cnt + 1'b1;
                if (post_cnt == 2'd1) state <= S_WAIT;
              end
            end
          end
          S_ASIC1, S_ASIC2: begin
            frame.user <= chunk[state == S_ASIC2];
            crc        <= crc32_step(crc, chunk[state == S_ASIC2]);
            fcnt       <= fcnt + 1'b1;
            if (fcnt == 3'(FRAMES_PER_ASIC - 1)) state <= (state == S_ASIC1) ? S_ASIC2 : S_TRAILER;
          end
          S_TRAILER: begin
            frame.user <= {crc, 80'd0};
            pkt_sent   <= 1'b1;
            post_cnt   <= '0;
            state      <= S_POST;
          end
          default: state <= S_WAIT;
        endcase
      end
    end
  end

  a_chunk_there: assert property (@(posedge clk) disable iff (!rst_n) |chunk_pop |-> !(|(chunk_pop & chunk_empty)));

endmodule
