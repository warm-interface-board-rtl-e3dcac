// Sustained-rate test of the full WIB (four FEMBs, default size): 300
// converts at the 2 MHz convert rate (60 clocks), each ASIC pair of every FEMB
// starting 0..3 clocks late at random. Every FEMB link must carry exactly 18
// data frames per packet, the delay from convert to header must stay bounded
// (no backlog builds up), no packet may report an error, every header must
// name its own convert, and the idle frames must absorb the jitter (some are
// dropped).
module tb_wib_rate;
  import wib_pkg::*;
  import wib_tb_pkg::*;

  localparam int NF = 4, NCONV = 300;

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
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  logic start [NF];
  int   seq = 0;
  for (genvar f = 0; f < NF; f++) begin : g_f
    for (genvar a = 0; a < 2; a++) begin : g_a
      colddata_model #(.SKEW_B((f * 3 + a) % 4)) u_cd (
        .clk, .start(start[f]), .tag(f * 2 + a), .seq, .bad_chk(1'b0), .trunc_at(0),
        .link_a(femb_link[f][a][0]), .link_b(femb_link[f][a][1]));
    end
  end

  int cyc = 0;
  int conv_cyc [$];          // clock of each convert
  always @(posedge clk) cyc++;

  int nhdr [NF], ndata [NF], max_lat [NF], min_lat [NF], n_drop = 0;
  initial for (int f = 0; f < NF; f++) begin nhdr[f] = 0; ndata[f] = 0; max_lat[f] = 0; min_lat[f] = 1 << 30; end

  always @(posedge clk) if (rst_n) begin
    n_drop <= n_drop + $countones(idle_dropped);
    for (int f = 0; f < NF; f++) if (gbt_valid[f] && gbt_frame[f].h == GBT_H_DATA) begin
      ndata[f]++;
      if (gbt_frame[f].user[7:0] == 8'hA5 && (ndata[f] % 18) == 1) begin
        int lat;
        check(gbt_frame[f].user[15:8] == 8'h00, "no errors");
        check(gbt_frame[f].user[31:16] == 16'(nhdr[f]), $sformatf("header names convert %0d", nhdr[f]));
        lat = cyc - conv_cyc[nhdr[f]];
        if (lat > max_lat[f]) max_lat[f] = lat;
        if (lat < min_lat[f]) min_lat[f] = lat;
        check(lat < 75, $sformatf("convert to header %0d clocks", lat));
        nhdr[f]++;
      end
    end
  end

  initial begin
    int late [NF];
    for (int f = 0; f < NF; f++) begin start[f] = 0; slow_ctrl[f] = '0; end
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    @(negedge clk); sync = 1; @(negedge clk); sync = 0;
    for (int k = 0; k < NCONV; k++) begin
      for (int f = 0; f < NF; f++) late[f] = $urandom_range(3);
      @(negedge clk); convert = 1; conv_cyc.push_back(cyc + 1); seq = k;
      @(negedge clk); convert = 0;
      for (int d = 0; d < 59; d++) begin
        for (int f = 0; f < NF; f++) start[f] = (d == late[f]);
        @(negedge clk);
      end
    end
    for (int f = 0; f < NF; f++) start[f] = 0;
    repeat (300) @(negedge clk);
    for (int f = 0; f < NF; f++) begin
      check(nhdr[f] == NCONV, $sformatf("FEMB %0d packets %0d", f, nhdr[f]));
      check(ndata[f] == 18 * NCONV, "18 data frames per packet");
      $display("FEMB %0d: convert-to-header latency %0d..%0d clocks", f, min_lat[f], max_lat[f]);
    end
    check(n_drop > 0, "idle frames absorbed the jitter");
    $display("idle frames dropped: %0d", n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCONV * 61 + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
