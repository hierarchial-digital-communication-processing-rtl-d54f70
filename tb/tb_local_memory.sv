// Testbench for local_memory: writes a pattern derived from the address to
// every word of all four banks, reads it all back, and checks that a
// deselected memory neither writes nor drives.
`include "tb/tb_check.svh"
module tb_local_memory;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic cs, we; logic [13:0] addr; logic [7:0] wdata, rdata;
  local_memory dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(100000)
  function automatic logic [7:0] pat(int a, int s); return 8'((a * 37) ^ (a >> 6) ^ s); endfunction
  initial begin
    cs = 0; we = 0; addr = 0; wdata = 0;
    for (int a = 0; a < 16384; a++) begin
      @(negedge clk); cs = 1; we = 1; addr = 14'(a); wdata = pat(a, 0);
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < 16384; a++) begin
      addr = 14'(a); #1; `CHK(rdata == pat(a, 0), $sformatf("read %h", a))
    end
    // writes with cs low are ignored
    for (int a = 0; a < 16384; a += 509) begin
      @(negedge clk); cs = 0; we = 1; addr = 14'(a); wdata = ~pat(a, 0); #1;
      `CHK(rdata == 8'h00, "deselected output")
    end
    @(negedge clk); cs = 1; we = 0;
    for (int a = 0; a < 16384; a += 509) begin addr = 14'(a); #1; `CHK(rdata == pat(a, 0), "no write when deselected") end
    `DONE
  end
endmodule
