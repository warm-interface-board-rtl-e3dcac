// Exhaustive test of cold_timing_mux: every select pattern and input value.
module tb_cold_timing_mux;
  localparam int NF = 4;
  logic pll_clk, fpga_clk, ptc_ctrl, fpga_ctrl;
  logic [NF-1:0] clk_sel_fpga, ctrl_sel_fpga, femb_clk, femb_ctrl;

  cold_timing_mux #(.NUM_FEMB(NF)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    for (int s = 0; s < 256; s++) begin
      for (int v = 0; v < 16; v++) begin
        {clk_sel_fpga, ctrl_sel_fpga} = 8'(s);
        {pll_clk, fpga_clk, ptc_ctrl, fpga_ctrl} = 4'(v);
        #1;
        for (int f = 0; f < NF; f++) begin
          checks++;
          if (femb_clk[f] != (clk_sel_fpga[f] ? fpga_clk : pll_clk) ||
              femb_ctrl[f] != (ctrl_sel_fpga[f] ? fpga_ctrl : ptc_ctrl)) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
