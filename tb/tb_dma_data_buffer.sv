// Testbench for dma_data_buffer: random high-bit loads, processor data and
// read captures; checks the composed write word and the split read word.
`include "tb/tb_check.svh"
module tb_dma_data_buffer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic hi_load, rd_capture; logic [3:0] hi_d, rd_hi, wr_hi, m_hi, m_rhi;
  logic [7:0] proc_wdata, rd_lo, m_rlo; logic [11:0] wr_word, rd_word;
  dma_data_buffer dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(20000)
  initial begin
    hi_load = 0; rd_capture = 0; hi_d = 0; proc_wdata = 0; rd_word = 0; m_hi = 0; m_rhi = 0; m_rlo = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      hi_load = 1'($urandom); rd_capture = 1'($urandom); hi_d = 4'($urandom);
      proc_wdata = 8'($urandom); rd_word = 12'($urandom); #1;
      `CHK(wr_word == {m_hi, proc_wdata}, "write word")
      `CHK(rd_lo == m_rlo && rd_hi == m_rhi, "read halves")
      if (hi_load) m_hi = hi_d;
      if (rd_capture) {m_rhi, m_rlo} = rd_word;
    end
    `DONE
  end
endmodule
