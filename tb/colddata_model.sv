// Behavioural model of one COLDDATA ASIC's two output links (decoded 8b10b
// characters, one per clock per link).
//
// A start pulse begins a packet: character 1 is K28.5, characters 2..56 the
// link's byte of words 2..56 from wib_tb_pkg, then K28.1 idles until the next
// start. Link B lags link A by SKEW_B clocks. Options latched with start:
// bad_chk flips a bit of link A's checksum; trunc_at (3..56, 0 = off) ends the
// packet with K28.1 at that character.
module colddata_model
  import wib_pkg::*;
  import wib_tb_pkg::*;
#(
  parameter int SKEW_B = 1
) (
  input  logic     clk,
  input  logic     start,
  input  int       tag,
  input  int       seq,
  input  logic     bad_chk,
  input  int       trunc_at,
  output cd_char_t link_a,
  output cd_char_t link_b
);

  int       pos = 0;      // 0 = idle, else character number being sent
  int       l_tag, l_seq, l_trunc;
  logic     l_bad;
  cd_char_t ch_a, ch_b;
  cd_char_t dly [SKEW_B+1];

  always_comb begin
    logic [15:0] w;
    ch_a = '{k: 1'b1, d: K28_1};
    ch_b = '{k: 1'b1, d: K28_1};
    if (pos == 1) begin
      ch_a = '{k: 1'b1, d: K28_5};
      ch_b = '{k: 1'b1, d: K28_5};
    end else if (pos >= 2 && pos <= 56 && !(l_trunc != 0 && pos >= l_trunc)) begin
      w = cd_word(l_tag, l_seq, pos);
      if (pos == 2 && l_bad) w[0] = ~w[0];
      ch_a = '{k: 1'b0, d: w[7:0]};
      ch_b = '{k: 1'b0, d: w[15:8]};
    end
  end

  always_ff @(posedge clk) begin
    if (start) begin
      pos     <= 1;
      l_tag   <= tag;
      l_seq   <= seq;
      l_bad   <= bad_chk;
      l_trunc <= trunc_at;
    end else if (pos != 0) begin
      pos <= (pos == 56) ? 0 : pos + 1;
    end
    dly[0] <= ch_b;
    for (int i = 1; i <= SKEW_B; i++) dly[i] <= dly[i-1];
  end

  assign link_a = ch_a;
  assign link_b = (SKEW_B == 0) ? ch_b : dly[SKEW_B-1];

endmodule
