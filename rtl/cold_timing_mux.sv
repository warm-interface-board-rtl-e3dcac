// Source selection for the clock and control lines sent to the FEMBs.
//
// On the board, two multiplexers each drive one line to every FEMB. The clock
// mux chooses between the clock from the PLL clock synthesizer (locked to the
// PTC's 50 MHz clock) and a clock from the FPGA; the control mux chooses
// between the PTC control line (through the WIB fanout) and control from the
// FPGA. Because the cold clock must come through a PLL, the PLL output is the
// normal clock source. Each select is per FEMB here. The two muxes and their
// inputs follow the WIB timing diagram; per-FEMB selects and the select
// polarity (1 = FPGA) are this design's choices.
//
// Timing: purely combinational.
module cold_timing_mux #(
  parameter int NUM_FEMB = 4
) (
  input  logic                pll_clk,
  input  logic                fpga_clk,
  input  logic                ptc_ctrl,
  input  logic                fpga_ctrl,
  input  logic [NUM_FEMB-1:0] clk_sel_fpga,
  input  logic [NUM_FEMB-1:0] ctrl_sel_fpga,
  output logic [NUM_FEMB-1:0] femb_clk,
  output logic [NUM_FEMB-1:0] femb_ctrl
);

  always_comb begin
    for (int i = 0; i < NUM_FEMB; i++) begin
      femb_clk[i]  = clk_sel_fpga[i]  ? fpga_clk  : pll_clk;
      femb_ctrl[i] = ctrl_sel_fpga[i] ? fpga_ctrl : ptc_ctrl;
    end
  end

endmodule
