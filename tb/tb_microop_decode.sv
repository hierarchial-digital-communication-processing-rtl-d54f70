// Testbench for microop_decode: random micro-operation addresses; checks
// that each of the three fields independently gives its one-hot strobe and
// that nothing is decoded while the region is not selected.
`include "tb/tb_check.svh"
module tb_microop_decode;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic sel, wr; logic [11:0] addr;
  logic [15:1] flop_set, flop_reset, test_sel, reg_load, reg_read;
  microop_decode dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(100000)
  function automatic logic [15:1] oh(logic [3:0] f);
    return (f == 0) ? 15'd0 : 15'(1 << (f - 1));
  endfunction
  initial begin
    for (int n = 0; n < 2000; n++) begin
      addr = 12'($urandom); wr = 1'($urandom); sel = 1'($urandom);
      #1;
      `CHK(flop_set   == (sel && wr  ? oh(addr[3:0])  : 15'd0), "set A set")
      `CHK(flop_reset == (sel && !wr ? oh(addr[3:0])  : 15'd0), "set A reset")
      `CHK(test_sel   == (sel        ? oh(addr[7:4])  : 15'd0), "set B test")
      `CHK(reg_load   == (sel && wr  ? oh(addr[11:8]) : 15'd0), "set C load")
      `CHK(reg_read   == (sel && !wr ? oh(addr[11:8]) : 15'd0), "set C read")
    end
    `DONE
  end
endmodule
