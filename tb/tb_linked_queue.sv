// Testbench for linked_queue: producer and consumer act independently at
// random; the order and contents are checked against a testbench queue, as
// are full, empty and count.
`include "tb/tb_check.svh"
module tb_linked_queue;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic push, pop, full, empty; logic [11:0] push_data, head_data; logic [4:0] count;
  linked_queue #(.W(12), .DEPTH(16)) dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(50000)
  logic [11:0] m [$]; int fulls = 0;
  initial begin
    push = 0; pop = 0; push_data = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      push = ($urandom % 100) < ((n / 500) % 2 ? 70 : 30);
      pop  = ($urandom % 100) < 50;
      push_data = 12'($urandom); #1;
      `CHK(count == 5'(m.size()) && empty == (m.size() == 0) && full == (m.size() == 16), "flags")
      if (m.size() > 0) `CHK(head_data == m[0], "head data")
      if (full) fulls++;
      if (pop && m.size() > 0) void'(m.pop_front());
      if (push && !full) m.push_back(push_data);
    end
    `CHK(fulls > 0, "queue filled at least once")
    `DONE
  end
endmodule
