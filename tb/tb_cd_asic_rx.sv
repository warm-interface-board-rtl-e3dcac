// Test of cd_asic_rx with a COLDDATA model whose link B lags link A by two
// clocks. Checks: the eight 14-byte payloads of each packet against the
// reference (0xBCBC first, A low byte, B high byte), the status (checksum and
// framing flags, and the convert record current at K28.5), that a whole
// packet is ready within 64 clocks of K28.5, and that holding the output
// until the FIFOs fill up reports lost data (ovf).
module tb_cd_asic_rx;
  import wib_pkg::*;
  import wib_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start = 0, bad = 0;
  int          seq = 0, trunc = 0;
  cd_char_t    la, lb;
  conv_rec_t   rec = '0;
  logic        pkt_ready, status_pop = 0, chunk_empty, chunk_pop = 0;
  pkt_status_t pkt_status;
  payload_t    chunk;

  colddata_model #(.SKEW_B(2)) u_cd (.clk, .start, .tag(5), .seq, .bad_chk(bad), .trunc_at(trunc),
                                     .link_a(la), .link_b(lb));
  cd_asic_rx dut (.clk, .rst_n, .link_a(la), .link_b(lb), .rec, .pkt_ready, .pkt_status, .status_pop,
                  .chunk, .chunk_empty, .chunk_pop);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic send(input bit b, input int t);
    @(negedge clk);
    bad = b; trunc = t; start = 1;
    rec = '{ts: 56'(seq * 1000 + 7), reset_cnt: 24'(seq + 2), conv_cnt: 16'(seq * 3), err: seq[0]};
    @(negedge clk);
    start = 0;
  endtask

  // read one packet and compare it
  task automatic receive(input int s, input bit b, input int t, input bit alone = 1);
    payload_t e;
    check(pkt_ready, "packet ready");
    check(pkt_status.rec == '{ts: 56'(s * 1000 + 7), reset_cnt: 24'(s + 2), conv_cnt: 16'(s * 3), err: s[0]},
          "convert record");
    check(pkt_status.chk_err_a == (b && t == 0) && !pkt_status.chk_err_b, "checksum flags");
    check(pkt_status.frm_err == (t != 0), "framing flag");
    check(!pkt_status.ovf, "no data lost");
    @(negedge clk); status_pop = 1; @(negedge clk); status_pop = 0;
    for (int j = 0; j < 8; j++) begin
      e = exp_payload(5, s, j);
      if (b && j == 0) e[16] = ~e[16];
      if (t != 0) for (int k = 0; k < 7; k++) if (7 * j + 1 + k >= t) e[16*k +: 16] = '0;
      check(!chunk_empty, "payload present");
      check(chunk == e, $sformatf("payload %0d of packet %0d", j, s));
      chunk_pop = 1; @(negedge clk); chunk_pop = 0;
    end
    if (alone) check(chunk_empty && !pkt_ready, "nothing left over");
  endtask

  int t0;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int k = 0; k < 4; k++) begin
      send(k == 1, (k == 2) ? 33 : 0);
      t0 = 0;
      while (!pkt_ready && t0 < 100) begin @(negedge clk); t0++; end
      check(t0 <= 64, $sformatf("packet ready after %0d clocks", t0));
      repeat (10) @(negedge clk);
      receive(seq, k == 1, (k == 2) ? 33 : 0);
      seq++;
    end
    // back-to-back packets, read afterwards
    for (int k = 0; k < 2; k++) begin send(0, 0); repeat (58) @(negedge clk); seq++; end
    repeat (10) @(negedge clk);
    receive(seq - 2, 0, 0, 0);
    receive(seq - 1, 0, 0);
    // overflow: three packets with nothing read
    for (int k = 0; k < 3; k++) begin send(0, 0); repeat (58) @(negedge clk); seq++; end
    repeat (10) @(negedge clk);
    for (int k = 0; k < 2; k++) begin
      @(negedge clk); status_pop = 1; @(negedge clk); status_pop = 0;
      repeat (8) begin chunk_pop = 1; @(negedge clk); chunk_pop = 0; end
    end
    send(0, 0); repeat (70) @(negedge clk); seq++;
    t0 = 0;
    for (int k = 0; k < 3; k++) if (pkt_ready) begin
      if (pkt_status.ovf) t0++;
      @(negedge clk); status_pop = 1; @(negedge clk); status_pop = 0;
    end
    check(t0 > 0, "data loss reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
