// Test of wib_frame_builder with the two ASIC receivers replaced by queues.
// Checks the 20-frame packet layout (header fields and error-byte mapping,
// ASIC 1 payloads, ASIC 2 payloads, CRC trailer, idle frames), that nothing
// starts while only one ASIC has a packet, that frame_valid follows frame_ce
// by one clock, and that the two idle frames are dropped, wholly or in part,
// when the next packets are already waiting.
module tb_wib_frame_builder;
  import wib_pkg::*;
  import wib_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        frame_ce = 0;
  logic [1:0]  pkt_ready, status_pop, chunk_empty, chunk_pop;
  pkt_status_t pkt_status [2];
  payload_t    chunk [2];
  logic [3:0]  slow_ctrl = 4'hA;
  gbt_frame_t  frame;
  logic        frame_valid, pkt_sent, idle_dropped;

  wib_frame_builder dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // source queues
  pkt_status_t sq [2][$];
  payload_t    cq [2][$];

  task automatic drive();
    for (int a = 0; a < 2; a++) begin
      pkt_ready[a]   = sq[a].size() > 0;
      pkt_status[a]  = (sq[a].size() > 0) ? sq[a][0] : '0;
      chunk_empty[a] = cq[a].size() == 0;
      chunk[a]       = (cq[a].size() > 0) ? cq[a][0] : '0;
    end
  endtask

  int div = 0, cyc = 0, ce_cyc = -10;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      for (int a = 0; a < 2; a++) begin
        if (status_pop[a]) void'(sq[a].pop_front());
        if (chunk_pop[a])  void'(cq[a].pop_front());
      end
      if (frame_ce) ce_cyc = cyc;
    end
    #1;
    drive();
    div = (div + 1) % 3;
    frame_ce = rst_n && (div == 0);
  end

  // expected packets
  typedef struct { int seq; pkt_status_t s [2]; } exp_t;
  exp_t eq [$];

  task automatic push_pair(input int seq, input logic [3:0] f0, input logic [3:0] f1, input bit cerr);
    exp_t e;
    e.seq = seq;
    for (int a = 0; a < 2; a++) begin
      e.s[a] = '0;
      e.s[a].rec = '{ts: 56'h12_3456_789A_BC00 + 56'(seq), reset_cnt: 24'(seq + 9), conv_cnt: 16'(seq * 5), err: cerr};
      {e.s[a].chk_err_a, e.s[a].chk_err_b, e.s[a].frm_err, e.s[a].ovf} = (a == 0) ? f0 : f1;
      for (int j = 0; j < 8; j++) cq[a].push_back(exp_payload(a, seq, j));
      sq[a].push_back(e.s[a]);
    end
    eq.push_back(e);
  endtask

  // checker
  int fi = -1, idles_since = 99, n_pkts = 0, n_drop = 0, n_dut_drop = 0, n_sent = 0;
  logic [31:0] crc;
  exp_t cur;
  always @(posedge clk) if (rst_n) begin
    if (idle_dropped) n_dut_drop++;
    if (pkt_sent) n_sent++;
    if (frame_valid) begin
      check(cyc == ce_cyc + 1, "frame one clock after frame_ce");
      check(frame.sc == slow_ctrl, "slow control bits");
      if (fi < 0) begin
        if (frame.h == GBT_H_IDLE) begin
          check(frame.user == '0, "idle empty");
          idles_since++;
        end else begin
          logic [7:0] eb;
          check(frame.h == GBT_H_DATA && eq.size() > 0, "header");
          cur = eq.pop_front();
          if (idles_since < 2) n_drop++;
          eb = {cur.s[0].ovf | cur.s[1].ovf, cur.s[0].rec.err,
                cur.s[1].frm_err, cur.s[1].chk_err_b, cur.s[1].chk_err_a,
                cur.s[0].frm_err, cur.s[0].chk_err_b, cur.s[0].chk_err_a};
          check(frame.user == {cur.s[0].rec.ts, cur.s[0].rec.reset_cnt, cur.s[0].rec.conv_cnt, eb, 8'hA5},
                $sformatf("header fields %h", frame.user));
          crc = ref_crc('1, frame.user);
          fi = 1;
        end
      end else if (fi <= 16) begin
        check(frame.h == GBT_H_DATA, "data code");
        check(frame.user == exp_payload((fi - 1) / 8, cur.seq, (fi - 1) % 8), $sformatf("payload %0d", fi));
        crc = ref_crc(crc, frame.user);
        fi++;
      end else begin
        check(frame.h == GBT_H_DATA && frame.user == {crc, 80'd0}, "trailer");
        fi = -1; idles_since = 0; n_pkts++;
      end
    end
  end

  task automatic wait_frames(input int n);
    repeat (n) begin
      @(posedge clk); while (!frame_valid) @(posedge clk);
    end
  endtask

  initial begin
    drive();
    repeat (4) @(negedge clk);
    rst_n = 1;
    // only ASIC 1 has a packet: nothing may start
    push_pair(0, 4'b1000, 4'b0000, 0);
    void'(sq[1].pop_back()); repeat (8) void'(cq[1].pop_back());
    wait_frames(10);
    check(fi < 0 && eq.size() == 1, "waits for both ASICs");
    for (int j = 0; j < 8; j++) cq[1].push_back(exp_payload(1, 0, j));
    sq[1].push_back(eq[0].s[1]);
    wait_frames(30);                         // packet 0 and its idle frames
    push_pair(1, 4'b0110, 4'b1001, 1);
    wait_frames(5);
    push_pair(2, 4'b0001, 4'b0100, 0);       // waiting at the trailer: both idles dropped
    wait_frames(19);
    wait_frames(1);
    push_pair(3, 4'b0000, 4'b0010, 0);       // after one idle: the second is dropped
    wait_frames(40);
    check(n_pkts == 4, $sformatf("packets %0d", n_pkts));
    check(n_sent == 4, "pkt_sent pulses");
    check(n_drop >= 2, $sformatf("idle drops %0d", n_drop));
    check(n_dut_drop == n_drop, "idle_dropped pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
