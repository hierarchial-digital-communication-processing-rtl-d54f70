// Testbench for mux_bus_arbiter: requesters that hold their request until
// granted and then drop it. Checks that each grant goes to the lowest
// numbered waiting requester, lasts exactly SLOT_CLKS clocks with phases
// control, address, data, and that every request is served.
`include "tb/tb_check.svh"
module tb_mux_bus_arbiter;
  import pliu_pkg::*;
  localparam int N = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt; logic busy; phase_e phase; logic [$clog2(N)-1:0] owner;
  mux_bus_arbiter #(.NREQ(N), .SLOT_CLKS(3)) dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(50000)
  int served = 0, issued = 0, held = 0;
  logic [N-1:0] prev_gnt;
  initial begin
    req = 0; prev_gnt = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      // a new slot begins when gnt rises
      if (gnt != 0 && prev_gnt == 0 || (gnt != prev_gnt && gnt != 0)) begin
        logic [N-1:0] waiting; int lo;
        waiting = req; lo = -1;
        for (int i = N-1; i >= 0; i--) if (waiting[i]) lo = i;
        `CHK(lo >= 0 && gnt == N'(1 << lo), "priority winner")
        `CHK(owner == $clog2(N)'(lo), "owner")
        `CHK(phase == PH_CTRL, "slot starts in control phase")
        held = 1; served++;
        req = req & ~gnt;
      end else if (gnt != 0) begin
        held++;
        `CHK(phase == (held == 2 ? PH_ADDR : PH_DATA), "phase order")
      end else if (prev_gnt != 0) begin
        `CHK(held == 3, "slot length three clocks");
      end
      prev_gnt = gnt;
      if (n < 3600) for (int i = 0; i < N; i++)
        if (!req[i] && !gnt[i] && ($urandom % 16) == 0) begin req[i] = 1; issued++; end
    end
    `CHK(served == issued, $sformatf("all served %0d of %0d", served, issued))
    `DONE
  end
endmodule
