// Testbench for dma_request_ctrl with a three-clock slot arbiter model:
// checks the request, the processor wait, bus drive per phase for reads and
// writes, read capture in the data phase, release after the slot, and the
// access error when DMA is disabled.
`include "tb/tb_check.svh"
module tb_dma_request_ctrl;
  import pliu_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic common_ref, dma_enable, wr, gnt, mux_req, proc_wait, drive, capture, done, access_error;
  phase_e phase;
  dma_request_ctrl dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(20000)
  task automatic reference(input bit w, input int delay);
    int waitc = 0;
    @(negedge clk); common_ref = 1; wr = w; #1;
    `CHK(proc_wait, "wait on common reference")
    @(negedge clk); `CHK(mux_req, "slot request")
    repeat (delay) begin @(negedge clk); `CHK(mux_req && proc_wait && !drive, "wait for grant") end
    gnt = 1;
    for (int p = 0; p < 3; p++) begin
      phase = phase_e'(p); #1;
      `CHK(drive == (p != 2 || w), "drive in phase")
      `CHK(capture == (p == 2 && !w), "capture in data phase")
      `CHK((p == 0 || !mux_req) && proc_wait, "held during slot")
      @(negedge clk);
    end
    gnt = 0; phase = PH_CTRL; #1;
    `CHK(done && proc_wait, "done after slot")
    @(negedge clk); `CHK(!proc_wait, "processor released")
    common_ref = 0;
    @(negedge clk); `CHK(!mux_req && !proc_wait, "idle again")
  endtask
  initial begin
    common_ref = 0; dma_enable = 0; wr = 0; gnt = 0; phase = PH_CTRL;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); common_ref = 1; #1;
    `CHK(!proc_wait, "no wait when DMA disabled")
    @(negedge clk); `CHK(access_error && !mux_req, "access error when disabled")
    @(negedge clk); `CHK(!access_error, "error is a single pulse")
    common_ref = 0; dma_enable = 1;
    for (int n = 0; n < 40; n++) reference(1'($urandom), $urandom % 5);
    `DONE
  end
endmodule
