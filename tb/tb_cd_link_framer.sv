// Test of cd_link_framer on link A of the COLDDATA model: good packets, a bad
// checksum, a truncated packet (padded to 55 bytes, framing error) and a stray
// data byte between packets. Every byte and flag is compared with the
// reference packet; the byte of word n must appear n+1 clocks after K28.5.
module tb_cd_link_framer;
  import wib_pkg::*;
  import wib_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     start = 0, bad = 0;
  int       seq = 0, trunc = 0;
  cd_char_t la, lb, din;
  logic     stray = 0;
  link_byte_t out;
  logic     out_valid, sof_seen;

  colddata_model #(.SKEW_B(0)) u_cd (.clk, .start, .tag(3), .seq, .bad_chk(bad), .trunc_at(trunc),
                                     .link_a(la), .link_b(lb));
  assign din = stray ? '{k: 1'b0, d: 8'h55} : la;

  cd_link_framer dut (.clk, .rst_n, .in(din), .out, .out_valid, .sof_seen);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // expectations of the packet in flight
  int  e_seq, e_trunc, nbytes, sof_t, cyc;
  bit  e_bad, e_stray;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n) begin
    if (sof_seen) begin sof_t = cyc; nbytes = 0; end
    if (out_valid) begin
      int w;
      logic [7:0] ed;
      w = nbytes + 2;
      ed = cd_word(3, e_seq, w);
      if (w == 2 && e_bad) ed[0] = ~ed[0];
      if (e_trunc != 0 && w >= e_trunc) ed = 8'h00;
      check(out.d == ed, $sformatf("byte of word %0d", w));
      check(out.first == (w == 2) && out.last == (w == 56), "first/last");
      check(cyc - sof_t == w - 1, "byte latency");
      if (w == 56) begin
        check(out.chk_err == (e_bad && e_trunc == 0), "checksum flag");
        check(out.frm_err == (e_trunc != 0 || e_stray), "framing flag");
      end
      nbytes++;
    end
  end

  task automatic send(input bit b, input int t, input bit s);
    @(negedge clk);
    e_seq = seq; e_bad = b; e_trunc = t; e_stray = s;
    bad = b; trunc = t; start = 1;
    @(negedge clk);
    start = 0;
    repeat (62) @(negedge clk);
    check(nbytes == 55, $sformatf("55 bytes per packet, got %0d", nbytes));
    seq++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    send(0, 0, 0);
    send(0, 0, 0);
    send(1, 0, 0);
    send(0, 20, 0);
    send(0, 0, 0);
    // stray data byte between packets
    @(negedge clk); stray = 1; @(negedge clk); stray = 0;
    send(0, 0, 1);
    send(0, 0, 0);
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
