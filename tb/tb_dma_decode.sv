// Testbench for dma_decode: all command words addressed to this PLIU and
// random words addressed elsewhere; checks the hit, the one command strobe
// and the line number.
`include "tb/tb_check.svh"
module tb_dma_decode;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic cmd_phase; logic [11:0] bus;
  logic hit, wr_data, rd_data, wr_ctrl, rd_status, attention, illegal; logic [2:0] line;
  dma_decode #(.PLIU_ID(5'd7)) dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(100000)
  initial begin
    for (int w = 0; w < 4096; w++) begin
      bus = 12'(w); cmd_phase = 1'($urandom); #1;
      begin
        automatic bit h = cmd_phase && w[11:7] == 7;
        automatic int c = w[6:4];
        `CHK(hit == h, "hit")
        `CHK({wr_data, rd_data, wr_ctrl, rd_status, attention, illegal} ==
             (h ? {c == 1, c == 2, c == 3, c == 4, c == 5, c >= 6} : 6'b0), "command strobes")
        if (h) `CHK(line == 3'(w >> 1), "line")
      end
    end
    `DONE
  end
endmodule
