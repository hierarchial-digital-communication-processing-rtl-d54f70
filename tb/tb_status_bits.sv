// Testbench for status_bits: drives CPS and micro-operation strobes at
// random and compares every flag and the test output with a reference model
// kept in the testbench.
`include "tb/tb_check.svh"
module tb_status_bits;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cps_dma_en_set, cps_dma_en_clr, cps_flag_set, cps_pliu_flag_clr;
  logic [15:1] flop_set, flop_reset, test_sel;
  logic dma_enable, pliu_flag, cps_flag, test_out;
  logic [7:0] gp;
  status_bits #(.NGP(8)) dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(20000)
  logic m_en, m_pf, m_cf; logic [7:0] m_gp; logic exp_t;
  initial begin
    {cps_dma_en_set, cps_dma_en_clr, cps_flag_set, cps_pliu_flag_clr} = 0;
    flop_set = 0; flop_reset = 0; test_sel = 0;
    m_en = 0; m_pf = 0; m_cf = 0; m_gp = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      {cps_dma_en_set, cps_dma_en_clr, cps_flag_set, cps_pliu_flag_clr} = 4'($urandom);
      flop_set = 0; flop_reset = 0; test_sel = 0;
      if ($urandom % 2) flop_set[1 + $urandom % 15] = 1;
      if ($urandom % 2) flop_reset[1 + $urandom % 15] = 1;
      test_sel[1 + $urandom % 11] = 1;
      // expected test output before the edge
      exp_t = 0;
      for (int i = 1; i < 16; i++) if (test_sel[i])
        exp_t = (i == 1) ? m_pf : (i == 2) ? m_cf : (i == 3) ? m_en : m_gp[i-4];
      #1 `CHK(test_out == exp_t, "test output")
      if (cps_dma_en_set) m_en = 1; else if (cps_dma_en_clr) m_en = 0;
      if (flop_set[1]) m_pf = 1; else if (cps_pliu_flag_clr || flop_reset[1]) m_pf = 0;
      if (cps_flag_set) m_cf = 1; else if (flop_reset[2]) m_cf = 0;
      for (int i = 0; i < 8; i++) if (flop_set[i+3]) m_gp[i] = 1; else if (flop_reset[i+3]) m_gp[i] = 0;
      @(posedge clk); #1;
      `CHK(dma_enable == m_en && pliu_flag == m_pf && cps_flag == m_cf && gp == m_gp, "flags")
    end
    `DONE
  end
endmodule
