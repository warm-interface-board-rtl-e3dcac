// WIB timing counters and the 40 MHz frame strobe.
//
// ts is a 56-bit time stamp that counts every clock from reset and is never
// cleared, so it rolls over only after years. conv_cnt counts convert commands
// (2 MHz) and is cleared by the sync command (30.5 Hz, once every 65536
// converts); reset_cnt (24 bits) counts sync commands. If conv_cnt has wrapped
// past 0xFFFF and another convert comes with no sync, conv_err is set and stays
// set until the next sync. At every convert the counters are latched into rec,
// which the ASIC receivers attach to the packet that follows.
// frame_ce is high one clock in every CLK_PER_FRAME (120 MHz characters, 40 MHz
// GBT frames).
//
// Timing: convert and sync are one-clock pulses; rec changes the clock after a
// convert. A sync and a convert in the same clock act as sync first, so that
// convert gets number 0. Field widths and the overflow rule follow the WIB
// data-format notes; counting a sync as a "reset" and latching at each convert
// are this design's reading.
module wib_timing
  import wib_pkg::*;
#(
  parameter int DIV = CLK_PER_FRAME
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        convert,
  input  logic        sync,
  output logic        frame_ce,
  output logic [55:0] ts,
  output logic [15:0] conv_cnt,
  output logic [23:0] reset_cnt,
  output conv_rec_t   rec
);

  logic [$clog2(DIV+1)-1:0] div_cnt;
  logic wrapped;    // conv_cnt passed 0xFFFF since the last sync
  logic conv_err;

  // values after applying this clock's sync
  logic [15:0] cnt_s;
  logic        wrap_s, err_s;
  logic [23:0] rst_s;
  always_comb begin
    cnt_s  = sync ? 16'd0 : conv_cnt;
    wrap_s = sync ? 1'b0  : wrapped;
    err_s  = sync ? 1'b0  : conv_err;
    rst_s  = sync ? reset_cnt + 1'b1 : reset_cnt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt   <= '0;
      frame_ce  <= 1'b0;
      ts        <= '0;
      conv_cnt  <= '0;
      reset_cnt <= '0;
      wrapped   <= 1'b0;
      conv_err  <= 1'b0;
      rec       <= '0;
    end else begin
      ts       <= ts + 1'b1;
      div_cnt  <= (div_cnt == ($clog2(DIV+1))'(DIV - 1)) ? '0 : div_cnt + 1'b1;
      frame_ce <= (div_cnt == ($clog2(DIV+1))'(DIV - 1));
      reset_cnt <= rst_s;
      conv_cnt  <= cnt_s;
      wrapped   <= wrap_s;
      conv_err  <= err_s;
      if (convert) begin
        conv_cnt  <= cnt_s + 1'b1;
        if (cnt_s == 16'hFFFF) wrapped <= 1'b1;
        if (wrap_s) conv_err <= 1'b1;
        rec       <= '{ts: ts, reset_cnt: rst_s, conv_cnt: cnt_s, err: err_s || wrap_s};
      end
    end
  end

endmodule
