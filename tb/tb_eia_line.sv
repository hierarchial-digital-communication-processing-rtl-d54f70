// Testbench for eia_line: normal mode passes controls and data both ways
// with two clocks of synchronisation on inputs; loopback returns the URT's
// outputs to its inputs and idles the modem side; status changes set the
// sticky change flag until cleared.
`include "tb/tb_check.svh"
module tb_eia_line;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic loopback, urt_dtr, urt_rts, urt_txd, urt_sup, urt_dsr, urt_cts, urt_rxd;
  logic m_dtr, m_rts, m_txd, m_sup, m_dsr, m_cts, m_rxd, m_ri, m_dcd, m_sup_in;
  logic [4:0] status; logic change, change_clr; logic [7:0] led;
  eia_line dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(20000)
  initial begin
    loopback = 0; {urt_dtr, urt_rts, urt_txd, urt_sup} = 4'b0010;
    {m_dsr, m_cts, m_rxd, m_ri, m_dcd, m_sup_in} = 6'b001000; change_clr = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (3) @(posedge clk);
    @(negedge clk); change_clr = 1; @(negedge clk); change_clr = 0;
    `CHK(!change, "change cleared")
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      {urt_dtr, urt_rts, urt_txd, urt_sup} = 4'($urandom);
      {m_dsr, m_cts, m_rxd, m_ri, m_dcd, m_sup_in} = 6'($urandom);
      loopback = (n >= 150);
      #1;
      if (!loopback) `CHK({m_dtr, m_rts, m_txd, m_sup} == {urt_dtr, urt_rts, urt_txd, urt_sup}, "outputs to modem")
      else           `CHK({m_dtr, m_rts, m_txd, m_sup} == 4'b0010, "modem side idle in loopback")
      repeat (2) @(negedge clk); #1;
      if (!loopback) begin
        `CHK(status == {m_sup_in, m_dcd, m_ri, m_cts, m_dsr}, "modem status")
        `CHK(urt_rxd == m_rxd && urt_dsr == m_dsr && urt_cts == m_cts, "inputs to URT")
      end else begin
        `CHK(urt_rxd == urt_txd && urt_cts == urt_rts && urt_dsr == urt_dtr, "loopback to URT")
        `CHK(status == {urt_sup, urt_rts, 1'b0, urt_rts, urt_dtr}, "loopback status")
      end
      `CHK(led[6:0] == {status[3:0], m_rts, m_dtr, ~m_txd} && led[7] == status[4], "LEDs")
      // hold steady, clear the flag, then a single change must set it
      @(negedge clk); change_clr = 1; @(negedge clk); change_clr = 0; #1;
      `CHK(!change, "flag clears when steady")
      if (!loopback) begin m_dcd = ~m_dcd; repeat (3) @(negedge clk); `CHK(change, "status change flagged") end
    end
    `DONE
  end
endmodule
