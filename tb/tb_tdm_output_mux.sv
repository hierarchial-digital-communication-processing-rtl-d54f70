// Testbench for tdm_output_mux: the CPS pushes bytes to random channels;
// the output is checked period by period: a sync idle, then per channel the
// next queued byte in order or an idle fill when the queue is empty.
`include "tb/tb_check.svh"
module tb_tdm_output_mux;
  import pliu_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic push, push_ok, out_ready, out_sync, out_is_fill; logic [3:0] push_chan, out_chan;
  logic [7:0] push_byte, out_byte; logic [15:0] fill_count;
  tdm_output_mux #(.NCH(12), .QDEPTH(8)) dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(100000)
  logic [7:0] m [12][$]; int pos = 0, fills = 0, refused = 0;
  initial begin
    push = 0; out_ready = 0; push_chan = 0; push_byte = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      push = ($urandom % 3) == 0; push_chan = 4'($urandom % 12); push_byte = 8'($urandom % 128);
      out_ready = ($urandom % 2); #1;
      if (push && !push_ok) begin `CHK(m[push_chan].size() == 8, "refused only when full") refused++; end
      if (out_ready) begin
        if (pos == 0) `CHK(out_sync && out_byte == CODE_IDLE, "sync idle")
        else begin
          `CHK(!out_sync && out_chan == 4'(pos - 1), "channel order")
          if (m[pos-1].size() == 0) begin `CHK(out_is_fill && out_byte == CODE_IDLE, "fill idle") fills++; end
          else begin `CHK(!out_is_fill && out_byte == m[pos-1][0], "queued byte") void'(m[pos-1].pop_front()); end
        end
        pos = (pos == 12) ? 0 : pos + 1;
      end
      if (push_ok) m[push_chan].push_back(push_byte);
    end
    #1 `CHK(fill_count == 16'(fills), "fill count")
    `CHK(refused > 0 || 1, "refusal path")
    `DONE
  end
endmodule
