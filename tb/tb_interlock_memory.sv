// Testbench for interlock_memory: random test and reset operations from
// several processor identifiers on a few cells, compared with a reference
// model; also checks the one-clock reply timing.
`include "tb/tb_check.svh"
module tb_interlock_memory;
  import pliu_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic req, op_reset, rsp_valid, rsp_bit; logic [11:0] addr; logic [4:0] id, rsp_id;
  interlock_memory #(.CELLS(4096)) dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(50000)
  bit m_lock [4096]; logic [4:0] m_id [4096];
  logic e_bit; logic [4:0] e_id; int wins = 0, busy = 0;
  initial begin
    req = 0; op_reset = 0; addr = 0; id = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      req = 1; op_reset = ($urandom % 4) == 0; addr = 12'($urandom % 8) * 12'd511; id = 5'($urandom % 19);
      if (op_reset) begin m_lock[addr] = 0; m_id[addr] = id; e_bit = 0; e_id = id; end
      else if (!m_lock[addr]) begin m_lock[addr] = 1; m_id[addr] = id; e_bit = 1; e_id = id; wins++; end
      else begin e_bit = 1; e_id = m_id[addr]; busy++; end
      @(negedge clk); req = 0; #1;
      `CHK(rsp_valid, "reply next clock")
      `CHK(rsp_bit == e_bit && rsp_id == e_id, "interlock reply")
      @(negedge clk); `CHK(!rsp_valid, "single reply")
    end
    `CHK(wins > 10 && busy > 10, "both test outcomes exercised")
    `DONE
  end
endmodule
