// Testbench for tdm_input_editor: generates periods of one idle plus 12
// channel bytes with idles, data and control codes in the proportions of a
// typical stream, and checks that host data and control bytes come out in
// order with their channels, idles are dropped and counted, and a corrupted
// sync byte gives a framing error followed by resynchronisation.
`include "tb/tb_check.svh"
module tb_tdm_input_editor;
  import pliu_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, host_valid, ctl_valid, frame_err, in_sync; logic [7:0] in_byte, host_byte, ctl_byte;
  logic [3:0] host_chan, ctl_chan; logic [15:0] idle_count;
  tdm_input_editor #(.NCH(12)) dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(200000)
  logic [11:0] hq [$]; logic [11:0] cq [$]; int idles = 0, ferr = 0;
  always @(posedge clk) if (rst_n) begin
    if (host_valid) begin `CHK(hq.size() > 0 && {host_chan, host_byte} == hq[0], "host byte") if (hq.size() > 0) void'(hq.pop_front()); end
    if (ctl_valid)  begin `CHK(cq.size() > 0 && {ctl_chan, ctl_byte} == cq[0], "control byte") if (cq.size() > 0) void'(cq.pop_front()); end
    if (frame_err) ferr++;
  end
  task automatic send(logic [7:0] b);
    @(negedge clk); in_valid = 1; in_byte = b; @(negedge clk); in_valid = 0;
  endtask
  initial begin
    in_valid = 0; in_byte = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    send(8'h41);                 // before sync: ignored
    for (int p = 0; p < 300; p++) begin
      send(p == 150 ? 8'h55 : CODE_IDLE);
      if (p == 150) send(CODE_IDLE);  // resync on the next idle
      for (int c = 0; c < 12; c++) begin
        int r; logic [7:0] b;
        r = $urandom % 100;
        if (r < 84) begin b = CODE_IDLE; idles++; end
        else if (r < 99) begin b = 8'(32 + $urandom % 90); hq.push_back({4'(c), b}); end
        else begin b = (r % 2) ? CODE_BREAK : 8'o235; cq.push_back({4'(c), b}); end
        send(b);
      end
    end
    repeat (3) @(negedge clk);
    `CHK(hq.size() == 0 && cq.size() == 0, "all data and control delivered")
    `CHK(idle_count == 16'(idles), "idles dropped and counted")
    `CHK(ferr == 1, "one framing error")
    `DONE
  end
endmodule
