// Testbench for dma_addr_ctrl_mux: random page loads, regions, offsets and
// phases; checks the CPS address and the control/address words.
`include "tb/tb_check.svh"
module tb_dma_addr_ctrl_mux;
  import pliu_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic page_load; logic [5:0] page_d, page_q, m_page;
  space_e space; logic [14:0] abs_addr; logic [11:0] page_off; mop_e op; phase_e phase;
  logic [17:0] cps_addr, ea; logic [11:0] word;
  dma_addr_ctrl_mux dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(20000)
  initial begin
    page_load = 0; page_d = 0; m_page = 0; space = SP_ABS; abs_addr = 0; page_off = 0; op = MOP_READ; phase = PH_CTRL;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      page_load = ($urandom % 4) == 0; page_d = 6'($urandom);
      space = space_e'(3 + $urandom % 3); abs_addr = 15'($urandom); page_off = 12'($urandom);
      op = mop_e'($urandom); phase = phase_e'($urandom % 3); #1;
      ea = (space == SP_RELOC) ? {m_page, page_off} : (space == SP_ILOCK) ? {6'd0, page_off} : {3'd0, abs_addr};
      `CHK(cps_addr == ea, "cps address")
      `CHK(word == ((phase == PH_CTRL) ? {op, 4'd0, ea[17:12]} : (phase == PH_ADDR) ? ea[11:0] : 12'd0), "bus word")
      if (page_load) m_page = page_d;
    end
    `DONE
  end
endmodule
