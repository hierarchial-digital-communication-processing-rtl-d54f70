// Testbench for urt_clock: checks the baud generator period for several
// divisors, asynchronous and loopback lines following it, and synchronous
// lines pulsing once per rising edge of the modem clock.
`include "tb/tb_check.svh"
module tb_urt_clock;
  import pliu_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic div_load; logic [11:0] div_d; clk_mode_e mode [8];
  logic [7:0] ext_txc, ext_rxc, txc_en, rxc_en; logic tick;
  urt_clock #(.NLINES(8), .DIV_W(12)) dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(200000)
  int ticks, edges, pulses;
  initial begin
    div_load = 0; div_d = 0; ext_txc = 0; ext_rxc = 0;
    for (int i = 0; i < 8; i++) mode[i] = (i < 3) ? CLK_ASYNC : (i < 6) ? CLK_SYNC : CLK_LOOPBACK;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int d = 2; d < 40; d += 7) begin
      @(negedge clk); div_load = 1; div_d = 12'(d); @(negedge clk); div_load = 0;
      ticks = 0;
      repeat ((d+1)*10) begin
        @(negedge clk);
        if (tick) ticks++;
        `CHK(txc_en[0] == tick && rxc_en[2] == tick && txc_en[7] == tick && rxc_en[6] == tick, "async/loopback follow generator")
      end
      `CHK(ticks == 10, $sformatf("divisor %0d gives %0d ticks", d, ticks))
    end
    // synchronous lines: one pulse per modem clock rising edge
    edges = 0; pulses = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      if (n % 7 == 0 && n < 380) begin ext_txc[4] = ~ext_txc[4]; if (ext_txc[4]) edges++; end
      if (txc_en[4]) pulses++;
      `CHK(txc_en[3] == 0 && rxc_en[5] == 0, "idle modem clock gives no pulse")
    end
    `CHK(pulses == edges, $sformatf("sync pulses %0d edges %0d", pulses, edges))
    `DONE
  end
endmodule
