// Receiver for one COLDDATA ASIC: its two links, their FIFOs and the packer.
//
// Each link goes through a cd_link_framer into a small FIFO of its own, which
// absorbs any skew between link A and link B. The packer pops both FIFOs
// together, joins the bytes into 16-bit words (A low, B high) and packs them
// into 14-byte GBT frame payloads: the first payload starts with 0xBCBC
// followed by words 2..7, each later one holds seven words, so a packet fills
// exactly eight payloads. Payloads go into the chunk FIFO; when the last word
// of a packet is packed, its status (checksum errors of A and B, framing error,
// lost data, and the convert record latched when link A's K28.5 arrived)
// goes into the status FIFO, so a non-empty status FIFO means a
// whole packet is waiting. The frame builder reads both FIFOs.
//
// Timing: words are packed at up to one per clock; a payload is written every
// seventh word. The packer stalls while the chunk FIFO is full; a link FIFO that
// overflows meanwhile drops bytes and marks ovf in the status.
// The payload layout follows the WIB data-format table; FIFO depths, the stall
// rule and the error bits are this design's choices.
module cd_asic_rx
  import wib_pkg::*;
#(
  parameter int LINK_FIFO_DEPTH  = 8,
  parameter int CHUNK_FIFO_DEPTH = 16,
  parameter int STAT_FIFO_DEPTH  = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  cd_char_t    link_a,
  input  cd_char_t    link_b,
  input  conv_rec_t   rec,          // current convert record from wib_timing
  // to the frame builder
  output logic        pkt_ready,
  output pkt_status_t pkt_status,
  input  logic        status_pop,
  output payload_t    chunk,
  output logic        chunk_empty,
  input  logic        chunk_pop
);

  localparam int LBW = $bits(link_byte_t);

  link_byte_t fa_out, fb_out;
  logic       fa_valid, fb_valid;
  logic       fa_sof, fb_sof;   // fb_sof unused: link A marks the packet start

  cd_link_framer u_framer_a (.clk, .rst_n, .in(link_a), .out(fa_out), .out_valid(fa_valid), .sof_seen(fa_sof));
  cd_link_framer u_framer_b (.clk, .rst_n, .in(link_b), .out(fb_out), .out_valid(fb_valid), .sof_seen(fb_sof));

  logic [LBW-1:0] qa_raw, qb_raw;
  link_byte_t     qa, qb;
  logic           qa_full, qb_full, qa_empty, qb_empty, pair_pop;
  logic [$clog2(LINK_FIFO_DEPTH+1)-1:0] qa_count, qb_count;

  sync_fifo #(.WIDTH(LBW), .DEPTH(LINK_FIFO_DEPTH)) u_fifo_a (
    .clk, .rst_n, .wr_en(fa_valid && !qa_full), .wr_data(fa_out), .full(qa_full),
    .rd_en(pair_pop), .rd_data(qa_raw), .empty(qa_empty), .count(qa_count));
  sync_fifo #(.WIDTH(LBW), .DEPTH(LINK_FIFO_DEPTH)) u_fifo_b (
    .clk, .rst_n, .wr_en(fb_valid && !qb_full), .wr_data(fb_out), .full(qb_full),
    .rd_en(pair_pop), .rd_data(qb_raw), .empty(qb_empty), .count(qb_count));
  assign qa = link_byte_t'(qa_raw);
  assign qb = link_byte_t'(qb_raw);

  // chunk and status FIFOs
  logic     ck_full, ck_wr;
  payload_t ck_wdata;
  logic [$clog2(CHUNK_FIFO_DEPTH+1)-1:0] ck_count;
  logic     st_full, st_empty, st_wr;
  pkt_status_t st_wdata;
  logic [$clog2(STAT_FIFO_DEPTH+1)-1:0] st_count;
  logic [$bits(pkt_status_t)-1:0] st_raw;

  sync_fifo #(.WIDTH($bits(payload_t)), .DEPTH(CHUNK_FIFO_DEPTH)) u_chunk_fifo (
    .clk, .rst_n, .wr_en(ck_wr), .wr_data(ck_wdata), .full(ck_full),
    .rd_en(chunk_pop), .rd_data(chunk), .empty(chunk_empty), .count(ck_count));
  sync_fifo #(.WIDTH($bits(pkt_status_t)), .DEPTH(STAT_FIFO_DEPTH)) u_stat_fifo (
    .clk, .rst_n, .wr_en(st_wr), .wr_data(st_wdata), .full(st_full),
    .rd_en(status_pop), .rd_data(st_raw), .empty(st_empty), .count(st_count));
  assign pkt_status = pkt_status_t'(st_raw);
  assign pkt_ready  = !st_empty;

  // packer
  logic [2:0]  slot;       // word slot 0..6 in the payload being filled
  payload_t    acc;        // payload being filled (slots below `slot` valid)
  logic        pkt_err;    // A/B disagreement within this packet
  logic        ovf;        // bytes lost since the last status
  conv_rec_t   rec_sof;    // record taken at link A's K28.5
  conv_rec_t   rec_pkt;    // record of the packet being packed
  logic [15:0] word;
  payload_t    acc_next;
  logic [2:0]  slot_here;  // slot this word goes to

  assign slot_here = qa.first ? 3'd1 : slot;

  assign pair_pop = !qa_empty && !qb_empty && !ck_full;
  assign word     = {qb.d, qa.d};

  always_comb begin
    acc_next = acc;
    if (qa.first) acc_next = payload_t'(ASIC_HDR_ID);
    acc_next[16*slot_here +: 16] = word;
  end

  assign ck_wr    = pair_pop && (slot_here == 3'(WORDS_PER_FRAME - 1));
  assign ck_wdata = acc_next;
  assign st_wr    = pair_pop && qa.last && !st_full;
  assign st_wdata = '{rec: rec_pkt, chk_err_a: qa.chk_err, chk_err_b: qb.chk_err,
                      frm_err: qa.frm_err || qb.frm_err || pkt_err || (qa.first != qb.first)
                               || (qa.last != qb.last) || (slot_here != 3'(WORDS_PER_FRAME - 1)),
                      ovf: ovf || (fa_valid && qa_full) || (fb_valid && qb_full)};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot    <= '0;
      acc     <= '0;
      pkt_err <= 1'b0;
      ovf     <= 1'b0;
      rec_sof <= '0;
      rec_pkt <= '0;
    end else begin
      if (fa_sof) rec_sof <= rec;
      if ((fa_valid && qa_full) || (fb_valid && qb_full)) ovf <= 1'b1;
      if (pair_pop) begin
        acc  <= acc_next;
        slot <= (slot_here == 3'(WORDS_PER_FRAME - 1)) ? 3'd0 : slot_here + 1'b1;
        if (qa.first) begin
          pkt_err <= 1'b0;
          rec_pkt <= rec_sof;
        end
        if ((qa.first != qb.first) || (qa.last != qb.last)) pkt_err <= 1'b1;
        if (st_wr) begin
          pkt_err <= 1'b0;
          ovf     <= (fa_valid && qa_full) || (fb_valid && qb_full);
        end
      end
    end
  end

  // A status is only written once all of its payloads are in the chunk FIFO.
  a_stat_room: assert property (@(posedge clk) disable iff (!rst_n) (pair_pop && qa.last) |-> !st_full);

endmodule
