// Packet framer for one COLDDATA link (8b10b characters, already decoded).
//
// Outside a packet the link carries K28.1 idles. A K28.5 starts a packet; the
// next 55 characters are the link's byte of words 2..56, handed on one per
// clock with first set on word 2 and last on word 56. Words 2 and 3 carry the
// link's 16-bit checksum (low byte first); the framer sums the bytes of words
// 4..56 and flags chk_err on the last byte when the sum differs. A K character
// inside a packet truncates it: the framer then pads the rest of the packet
// with zero bytes, one per clock, ignoring the link until it is done, and flags
// frm_err on the last byte. A data byte or an unknown K character between
// packets is remembered and flagged as frm_err with the next packet.
//
// Timing: one character per clock in; out_valid one clock after the character.
// Packet structure follows the COLDDATA format; the checksum algorithm (plain
// 16-bit sum of words 4..56), the padding and the error rules are this design's.
module cd_link_framer
  import wib_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  cd_char_t   in,
  output link_byte_t out,
  output logic       out_valid,
  output logic       sof_seen      // pulse: a K28.5 started a packet
);

  typedef enum logic [1:0] {S_HUNT, S_PKT, S_PAD} state_t;

  state_t      state;
  logic [5:0]  word;      // word number of the next byte, 2..56
  logic [15:0] chk;       // checksum received in words 2..3
  logic [15:0] sum;       // running sum of words 4..CURRENT-1
  logic        stray;     // unexpected character since the last packet

  logic [15:0] sum_next;
  assign sum_next = sum + 16'(in.d);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_HUNT;
      word      <= '0;
      chk       <= '0;
      sum       <= '0;
      stray     <= 1'b0;
      out       <= '0;
      out_valid <= 1'b0;
      sof_seen  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      sof_seen  <= 1'b0;
      case (state)
        S_HUNT: begin
          if (in.k && in.d == K28_5) begin
            state    <= S_PKT;
            word     <= 6'd2;
            sum      <= '0;
            sof_seen <= 1'b1;
          end else if (!(in.k && in.d == K28_1)) begin
            stray <= 1'b1;
          end
        end
        S_PKT: begin
          if (in.k) begin
            // Truncated: emit a zero byte for this word and pad the rest.
            out       <= '{first: (word == 6'd2), last: (word == 6'(CD_LAST_WORD)),
                           chk_err: 1'b0, frm_err: 1'b1, d: 8'h00};
            out_valid <= 1'b1;
            if (word == 6'(CD_LAST_WORD)) begin
              state <= S_HUNT;
              stray <= 1'b0;
            end else begin
              state <= S_PAD;
              word  <= word + 1'b1;
            end
          end else begin
            if (word == 6'd2) chk[7:0]  <= in.d;
            if (word == 6'd3) chk[15:8] <= in.d;
            if (word >= 6'(CD_CHK_FIRST)) sum <= sum_next;
            out       <= '{first: (word == 6'd2), last: (word == 6'(CD_LAST_WORD)),
                           chk_err: (word == 6'(CD_LAST_WORD)) && (sum_next != chk),
                           frm_err: (word == 6'(CD_LAST_WORD)) && stray,
                           d: in.d};
            out_valid <= 1'b1;
            if (word == 6'(CD_LAST_WORD)) begin
              state <= S_HUNT;
              stray <= 1'b0;
            end else begin
              word <= word + 1'b1;
            end
          end
        end
        S_PAD: begin
          out       <= '{first: 1'b0, last: (word == 6'(CD_LAST_WORD)),
                         chk_err: 1'b0, frm_err: 1'b1, d: 8'h00};
          out_valid <= 1'b1;
          if (word == 6'(CD_LAST_WORD)) begin
            state <= S_HUNT;
            stray <= 1'b0;
          end else begin
            word <= word + 1'b1;
          end
        end
        default: state <= S_HUNT;
      endcase
    end
  end

endmodule
