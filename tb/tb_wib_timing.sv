// Test of wib_timing: frame strobe every third clock, time stamp counting
// clocks, convert and reset counters with the record latched at each convert,
// a sync coinciding with a convert, and the overflow error after 65537
// converts with no sync, cleared by the next sync.
module tb_wib_timing;
  import wib_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic convert = 0, sync = 0, frame_ce;
  logic [55:0] ts;
  logic [15:0] conv_cnt;
  logic [23:0] reset_cnt;
  conv_rec_t   rec;

  wib_timing dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  int cyc = 0, last_ce = -1, n_ce = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (frame_ce) begin
      if (last_ce >= 0) check(cyc - last_ce == 3, "frame strobe period");
      last_ce = cyc; n_ce++;
    end
  end

  int m_conv = 0, m_rst = 0; bit m_wrap = 0, m_err = 0;
  task automatic pulse(input bit c, input bit s);
    logic [55:0] ts_now;
    @(negedge clk); convert = c; sync = s; ts_now = ts;
    if (s) begin m_conv = 0; m_wrap = 0; m_err = 0; m_rst++; end
    @(negedge clk); convert = 0; sync = 0;
    if (c) begin
      if (m_wrap) m_err = 1;
      check(rec.ts == ts_now && rec.conv_cnt == 16'(m_conv) && rec.reset_cnt == 24'(m_rst) &&
            rec.err == m_err, $sformatf("record %0d", m_conv));
      if (m_conv == 65535) m_wrap = 1;
      m_conv = (m_conv + 1) % 65536;
    end
    check(conv_cnt == 16'(m_conv) && reset_cnt == 24'(m_rst), "counters");
  endtask

  initial begin
    logic [55:0] t1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    t1 = ts; repeat (100) @(negedge clk);
    check(ts - t1 == 100, "time stamp counts clocks");
    pulse(0, 1);
    for (int k = 0; k < 10; k++) pulse(1, 0);
    pulse(1, 1);          // sync with convert: convert number 0
    check(rec.conv_cnt == 0, "sync and convert together");
    for (int k = 0; k < 65535; k++) pulse(1, 0);
    check(!rec.err, "no error at exactly 65536 converts");
    pulse(1, 0);
    check(rec.err, "overflow without sync flagged");
    pulse(1, 0);
    check(rec.err, "error stays until sync");
    pulse(0, 1);
    pulse(1, 0);
    check(!rec.err, "sync clears the error");
    check(n_ce > 1000, "frame strobes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
