// WIB FPGA data path: four FEMBs in, four GBT wide-mode DAQ links out.
//
// Each FEMB has two COLDDATA ASICs with two 1.28 Gb/s 8b10b links each; every
// 500 ns convert, each ASIC sends a 112-byte packet. For every FEMB the design
// has two cd_asic_rx (framing, per-link FIFOs, packing into 14-byte payloads)
// and one wib_frame_builder that sends the packets as 20 GBT frames per
// convert on that FEMB's DAQ link, so cold modules and DAQ links map 1:1.
// One wib_timing supplies the time stamp, convert and reset counters and the
// 40 MHz frame strobe to all builders. cold_timing_mux models the board muxes
// that pick the clock and control sent to the FEMBs.
//
// Interface: femb_link[f][a][l] is the decoded character of FEMB f, ASIC a
// (0 = ASIC 1), link l (0 = A, 1 = B), one per clk. clk is the 120 MHz
// character clock, taken as common to all links and to the frame logic.
// gbt_frame[f] is valid in the clock where gbt_valid[f] is high, once every
// three clocks; the serializer, GBT encoding and the transceivers are outside
// this module, as are the 8b10b deserializers, the PLL and slow control.
module wib_top
  import wib_pkg::*;
#(
  parameter int NUM_FEMB = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  cd_char_t            femb_link [NUM_FEMB][2][2],
  input  logic                convert,
  input  logic                sync,
  input  logic [3:0]          slow_ctrl [NUM_FEMB],
  output gbt_frame_t          gbt_frame [NUM_FEMB],
  output logic [NUM_FEMB-1:0] gbt_valid,
  output logic [NUM_FEMB-1:0] pkt_sent,
  output logic [NUM_FEMB-1:0] idle_dropped,
  output logic [55:0]         ts,
  output logic [15:0]         conv_cnt,
  output logic [23:0]         reset_cnt,
  // cold clock and control selection
  input  logic                pll_clk,
  input  logic                fpga_clk,
  input  logic                ptc_ctrl,
  input  logic                fpga_ctrl,
  input  logic [NUM_FEMB-1:0] clk_sel_fpga,
  input  logic [NUM_FEMB-1:0] ctrl_sel_fpga,
  output logic [NUM_FEMB-1:0] femb_clk,
  output logic [NUM_FEMB-1:0] femb_ctrl
);

  logic        frame_ce;
  conv_rec_t   rec;

  wib_timing u_timing (
    .clk, .rst_n, .convert, .sync, .frame_ce, .ts, .conv_cnt, .reset_cnt,
    .rec);

  cold_timing_mux #(.NUM_FEMB(NUM_FEMB)) u_cold_mux (
    .pll_clk, .fpga_clk, .ptc_ctrl, .fpga_ctrl, .clk_sel_fpga, .ctrl_sel_fpga,
    .femb_clk, .femb_ctrl);

  for (genvar f = 0; f < NUM_FEMB; f++) begin : g_femb
    logic [1:0]  pkt_ready, status_pop, chunk_empty, chunk_pop;
    pkt_status_t pkt_status [2];
    payload_t    chunk [2];

    for (genvar a = 0; a < 2; a++) begin : g_asic
      cd_asic_rx u_rx (
        .clk, .rst_n,
        .link_a(femb_link[f][a][0]), .link_b(femb_link[f][a][1]), .rec,
        .pkt_ready(pkt_ready[a]), .pkt_status(pkt_status[a]), .status_pop(status_pop[a]),
        .chunk(chunk[a]), .chunk_empty(chunk_empty[a]), .chunk_pop(chunk_pop[a]));
    end

    wib_frame_builder u_builder (
      .clk, .rst_n, .frame_ce,
      .pkt_ready, .pkt_status, .status_pop, .chunk, .chunk_empty, .chunk_pop,
      .slow_ctrl(slow_ctrl[f]),
      .frame(gbt_frame[f]), .frame_valid(gbt_valid[f]),
      .pkt_sent(pkt_sent[f]), .idle_dropped(idle_dropped[f]));
  end

endmodule
