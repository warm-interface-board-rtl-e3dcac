// End-to-end test of the WIB data path with all four FEMBs at default size.
//
// Eight COLDDATA models (two per FEMB, link B skewed by 0..3 clocks) send a
// packet after every convert. For every FEMB the checker follows the GBT frame
// stream and compares each frame of each 20-frame packet with values it
// computes itself: header fields from its own convert/sync bookkeeping, the 16
// payloads from the reference packet contents, and the trailer CRC. Idle
// frames must carry the idle header and no data.
// Mechanisms exercised and counted: packet merging, A/B link skew, checksum
// error, truncated packet, idle frames dropped after a late packet, convert
// counter overflow without sync, sync / reset counting, and the cold clock
// and control source muxes. It also checks that a packet leaves at the
// 40 MHz frame rate: 18 consecutive data frames, three clocks apart.
module tb_wib_top;
  import wib_pkg::*;
  import wib_tb_pkg::*;

  localparam int NF = 4;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  cd_char_t            femb_link [NF][2][2];
  logic                convert = 0, sync = 0;
  logic [3:0]          slow_ctrl [NF];
  gbt_frame_t          gbt_frame [NF];
  logic [NF-1:0]       gbt_valid, pkt_sent, idle_dropped;
  logic [55:0]         ts;
  logic [15:0]         conv_cnt;
  logic [23:0]         reset_cnt;
  logic                pll_clk = 0, fpga_clk = 0, ptc_ctrl = 0, fpga_ctrl = 0;
  logic [NF-1:0]       clk_sel_fpga = '0, ctrl_sel_fpga = '0;
  logic [NF-1:0]       femb_clk, femb_ctrl;

  wib_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- stimulus: COLDDATA models ----------------
  logic start [NF][2];
  int   seq_r [NF][2];
  logic bad_r [NF][2];
  int   trunc_r [NF][2];

  for (genvar f = 0; f < NF; f++) begin : g_f
    for (genvar a = 0; a < 2; a++) begin : g_a
      colddata_model #(.SKEW_B((f + a) % 4)) u_cd (
        .clk, .start(start[f][a]), .tag(f * 2 + a), .seq(seq_r[f][a]),
        .bad_chk(bad_r[f][a]), .trunc_at(trunc_r[f][a]),
        .link_a(femb_link[f][a][0]), .link_b(femb_link[f][a][1]));
    end
  end

  // ---------------- expected packets ----------------
  typedef struct {
    int          seq;
    logic [55:0] ts;
    logic [15:0] conv;
    logic [23:0] rst;
    bit          cerr;
    bit          bad [2];
    int          trunc [2];
  } exp_t;
  exp_t exp_q [NF][$];

  // checker's own view of the timing counters
  int  m_conv = 0, m_rst = 0;
  bit  m_wrapped = 0, m_err = 0;

  int n_pkt = 0, n_chk_err = 0, n_frm_err = 0, n_drop = 0, n_cerr = 0, n_sync = 0, n_mux = 0;
  int n_skewed = 0;

  task automatic do_sync();
    @(negedge clk); sync = 1;
    @(negedge clk); sync = 0;
    m_conv = 0; m_wrapped = 0; m_err = 0; m_rst++;
    n_sync++;
  endtask

  // One convert; fire = start the models; opts per FEMB/ASIC.
  task automatic do_convert(input bit fire, input int seq, input int late_femb,
                            input int late_by, input int bad_f, input int trunc_f);
    exp_t e;
    @(negedge clk);
    convert = 1;
    // the record the design latches at this convert
    e.ts   = ts;       // value latched at the coming clock edge
    e.conv = 16'(m_conv);
    e.rst  = 24'(m_rst);
    if (m_wrapped) m_err = 1;
    e.cerr = m_err;
    if (m_conv == 16'hFFFF) m_wrapped = 1;
    m_conv = (m_conv + 1) & 16'hFFFF;
    @(negedge clk);
    convert = 0;
    if (!fire) return;
    e.seq = seq;
    for (int f = 0; f < NF; f++) begin
      e.bad[0]   = (f == bad_f);
      e.bad[1]   = 0;
      e.trunc[0] = 0;
      e.trunc[1] = (f == trunc_f) ? 20 : 0;
      exp_q[f].push_back(e);
      for (int a = 0; a < 2; a++) begin
        seq_r[f][a]   = seq;
        bad_r[f][a]   = e.bad[a];
        trunc_r[f][a] = e.trunc[a];
      end
    end
    // start the models, FEMB late_femb later than the rest
    for (int f = 0; f < NF; f++) if (f != late_femb) for (int a = 0; a < 2; a++) start[f][a] = 1;
    @(negedge clk);
    for (int f = 0; f < NF; f++) for (int a = 0; a < 2; a++) start[f][a] = 0;
    if (late_femb >= 0) begin
      repeat (late_by) @(negedge clk);
      for (int a = 0; a < 2; a++) start[late_femb][a] = 1;
      @(negedge clk);
      for (int a = 0; a < 2; a++) start[late_femb][a] = 0;
    end
  endtask

  function automatic payload_t exp_asic_payload(input exp_t e, input int f, input int a, input int j);
    payload_t p;
    int tag;
    tag = f * 2 + a;
    p = exp_payload(tag, e.seq, j);
    if (e.bad[a] && j == 0) p[16] = ~p[16];           // word 2, link A bit 0
    if (e.trunc[a] != 0) begin
      for (int s = 0; s < 7; s++) begin
        int w;
        w = 7 * j + 1 + s;
        if (w >= e.trunc[a]) p[16*s +: 16] = '0;
      end
    end
    return p;
  endfunction

  // ---------------- checker, one per FEMB ----------------
  int fidx [NF];          // frame number within the packet, -1 = between packets
  logic [31:0] crc_m [NF];
  int last_data_t [NF];
  bit after_trailer [NF];
  int idles_since [NF];
  int n_dut_drop = 0;
  always @(posedge clk) if (rst_n) n_dut_drop <= n_dut_drop + $countones(idle_dropped);
  exp_t cur [NF];

  initial for (int f = 0; f < NF; f++) begin fidx[f] = -1; after_trailer[f] = 0; end

  always @(posedge clk) if (rst_n) begin
    for (int f = 0; f < NF; f++) begin
      if (gbt_valid[f]) begin
        gbt_frame_t fr;
        fr = gbt_frame[f];
        check(fr.sc == slow_ctrl[f], "slow control bits");
        if (fidx[f] < 0) begin
          if (fr.h == GBT_H_IDLE) begin
            check(fr.user == '0, "idle frame empty");
            idles_since[f]++;
          end else begin
            // header
            check(fr.h == GBT_H_DATA, "data header code");
            // fewer than the two scheduled idle frames after the last trailer
            if (after_trailer[f] && idles_since[f] < 2) begin
              n_drop++;
            end
            after_trailer[f] = 0;
            check(exp_q[f].size() > 0, "unexpected packet");
            if (exp_q[f].size() > 0) begin
              logic [7:0] eb;
              cur[f] = exp_q[f].pop_front();
              eb = {1'b0, cur[f].cerr, cur[f].trunc[1] != 0, 1'b0, cur[f].bad[1],
                    cur[f].trunc[0] != 0, 1'b0, cur[f].bad[0]};
              check(fr.user[7:0] == 8'hA5, "header id");
              check(fr.user[15:8] == eb, $sformatf("error byte %h exp %h", fr.user[15:8], eb));
              check(fr.user[31:16] == cur[f].conv, $sformatf("conv cnt %h exp %h", fr.user[31:16], cur[f].conv));
              check(fr.user[55:32] == cur[f].rst, "reset cnt");
              check(fr.user[111:56] == cur[f].ts, "time stamp");
              if (fr.user[8] || fr.user[11]) n_chk_err++;
              if (fr.user[10] || fr.user[13]) n_frm_err++;
              if (fr.user[14]) n_cerr++;
            end
            crc_m[f] = ref_crc(32'hFFFF_FFFF, fr.user);
            fidx[f] = 1;
            last_data_t[f] = 0;
          end
        end else begin
          check(fr.h == GBT_H_DATA, "data header code in packet");
          check(last_data_t[f] == 3, "frames three clocks apart");
          if (fidx[f] <= 16) begin
            int a, j;
            a = (fidx[f] - 1) / 8;
            j = (fidx[f] - 1) % 8;
            check(fr.user == exp_asic_payload(cur[f], f, a, j),
                  $sformatf("payload femb %0d asic %0d frame %0d", f, a, j));
            crc_m[f] = ref_crc(crc_m[f], fr.user);
            fidx[f]++;
          end else begin
            check(fr.user == {crc_m[f], 80'd0}, "trailer crc");
            n_pkt++;
            fidx[f] = -1;
            after_trailer[f] = 1;
            idles_since[f] = 0;
          end
          last_data_t[f] = 0;
        end
      end
      last_data_t[f]++;
    end
  end

  // ---------------- sequence ----------------
  initial begin
    for (int f = 0; f < NF; f++) begin
      slow_ctrl[f] = 4'(f + 5);
      for (int a = 0; a < 2; a++) begin start[f][a] = 0; seq_r[f][a] = 0; bad_r[f][a] = 0; trunc_r[f][a] = 0; end
    end
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    do_sync();
    for (int k = 0; k < 12; k++) begin
      do_convert(1, k, (k == 6) ? 2 : -1, 3, (k == 3) ? 0 : -1, (k == 4) ? 1 : -1);
      repeat ((k == 6) ? 53 : 57) @(negedge clk);  // keep the 60-clock convert period
    end
    repeat (200) @(negedge clk);
    // convert counter overflow: 65537 converts after a sync, no packets
    do_sync();
    for (int k = 0; k < 65537; k++) do_convert(0, 0, -1, 0, -1, -1);
    do_convert(1, 100, -1, 0, -1, -1);
    repeat (200) @(negedge clk);
    do_sync();
    do_convert(1, 101, -1, 0, -1, -1);
    repeat (200) @(negedge clk);

    // cold clock / control muxes
    for (int s = 0; s < 4; s++) begin
      clk_sel_fpga = NF'(s * 5); ctrl_sel_fpga = NF'(~(s * 3));
      pll_clk = s[0]; fpga_clk = ~s[0]; ptc_ctrl = s[1]; fpga_ctrl = ~s[1];
      #1;
      for (int f = 0; f < NF; f++) begin
        check(femb_clk[f]  == (clk_sel_fpga[f]  ? fpga_clk  : pll_clk),  "clock mux");
        check(femb_ctrl[f] == (ctrl_sel_fpga[f] ? fpga_ctrl : ptc_ctrl), "control mux");
      end
      n_mux++;
    end

    for (int f = 0; f < NF; f++) check(exp_q[f].size() == 0 && fidx[f] < 0, "all packets out");
    check(n_pkt == NF * 14, $sformatf("packets sent %0d", n_pkt));
    check(n_chk_err > 0, "checksum error seen");
    check(n_frm_err > 0, "framing error seen");
    check(n_drop > 0, "idle frames dropped");
    check(n_dut_drop == n_drop, "design flags each dropped idle frame");
    check(n_cerr > 0, "convert overflow seen");
    check(reset_cnt == 24'(n_sync), "reset count");
    $display("mechanisms: packets=%0d chk_err=%0d frm_err=%0d idle_dropped=%0d conv_overflow=%0d syncs=%0d mux=%0d",
             n_pkt, n_chk_err, n_frm_err, n_drop, n_cerr, n_sync, n_mux);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
