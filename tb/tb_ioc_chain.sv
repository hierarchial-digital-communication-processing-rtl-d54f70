// Testbench for ioc_chain: the CPS queues IOCs of random address and length
// while bytes flow; checks every byte address against the concatenation of
// the queued blocks, one interrupt per expended IOC, seamless continuation
// when the next IOC is queued, and an overrun when none is.
`include "tb/tb_check.svh"
module tb_ioc_chain;
  import pliu_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic ioc_push, queue_full, xfer, active, expended, overrun; ioc_t ioc_in;
  logic [17:0] xfer_addr; logic [2:0] queued;
  ioc_chain #(.DEPTH(4)) dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(100000)
  logic [17:0] expq [$];
  int nioc = 0, nexp = 0, nbytes = 0, novr = 0;
  always @(posedge clk) if (rst_n && expended) nexp++;
  always @(posedge clk) if (rst_n && overrun) novr++;
  // chaining: when an IOC is expended and another was waiting, the next one
  // is already in use (no gap in which data could be lost)
  int chained = 0;
  always @(negedge clk) if (rst_n && expended && queued != 0) begin `CHK(active, "seamless chain") chained++; end
  initial begin
    ioc_push = 0; xfer = 0; ioc_in = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); xfer = 1; @(negedge clk); xfer = 0; @(negedge clk);
    `CHK(novr == 1, "overrun with no IOC")
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      ioc_push = 0; xfer = 0;
      if (!queue_full && ($urandom % 8) == 0 && nioc < 60 && !(active && ($urandom % 8) < 6)) begin
        ioc_push = 1; ioc_in.addr = 18'($urandom); ioc_in.len = 12'(1 + $urandom % 20);
        for (int i = 0; i < ioc_in.len; i++) expq.push_back(ioc_in.addr + 18'(i));
        nioc++;
      end
      if (active && !ioc_push && ($urandom % 2)) begin
        xfer = 1; #1;
        `CHK(expq.size() > 0 && xfer_addr == expq[0], "byte address")
        if (expq.size() > 0) void'(expq.pop_front());
        nbytes++;
      end
    end
    @(negedge clk); ioc_push = 0; xfer = 0;
    while (active) begin @(negedge clk); xfer = 1; #1; if (expq.size() > 0) begin `CHK(xfer_addr == expq[0], "tail address") void'(expq.pop_front()); end @(negedge clk); xfer = 0; end
    repeat (2) @(negedge clk);
    `CHK(expq.size() == 0, "all bytes transferred")
    `CHK(nexp == nioc, $sformatf("one interrupt per IOC %0d/%0d", nexp, nioc))
    `CHK(novr == 1, "no overrun while IOCs queued")
    `CHK(chained > 5, "chaining exercised")
    `DONE
  end
endmodule
