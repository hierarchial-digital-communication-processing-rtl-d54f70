// Testbench for sync_msg_tx: random printable messages of 1 to 30 bytes
// under random input gaps and output stalls. The expected line stream
// (two idles, STX, message, ETX, checkword low then high) is built with a
// reference CRC-16 written here, which is first checked against the
// standard check value BB3D of the ASCII string "123456789". The number of
// line bytes per message (message length + 6) is checked too.
`include "tb/tb_check.svh"
module tb_sync_msg_tx;
  import pliu_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_last, in_ready, out_valid, out_ready;
  logic [7:0] in_byte, out_byte;
  sync_msg_tx dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(100000)
  // reference: reflected CRC-16, one bit at a time from an int accumulator
  function automatic int ref_crc(input logic [7:0] m [$]);
    int r = 0;
    foreach (m[i]) begin
      r = r ^ int'(m[i]);
      repeat (8) r = (r & 1) ? ((r >> 1) ^ 'hA001) : (r >> 1);
    end
    return r;
  endfunction
  typedef struct { logic [7:0] b; logic last; } item_t;
  item_t src [$]; logic [7:0] exp_q [$]; int line_bytes = 0, msg_bytes = 0, nmsg = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    `CHK(exp_q.size() > 0 && out_byte == exp_q[0], $sformatf("line byte %h", out_byte))
    if (exp_q.size() > 0) void'(exp_q.pop_front());
    line_bytes++;
  end
  initial begin
    logic [7:0] chk [$];
    chk = {8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    `CHK(ref_crc(chk) == 'hBB3D, "reference CRC check value")
    for (int m = 0; m < 60; m++) begin
      logic [7:0] body [$]; int n;
      body.delete(); n = 1 + $urandom_range(0, 29);
      for (int i = 0; i < n; i++) body.push_back(8'($urandom_range(8'h20, 8'h7e)));
      foreach (body[i]) src.push_back('{body[i], i == n - 1});
      exp_q.push_back(CODE_IDLE); exp_q.push_back(CODE_IDLE); exp_q.push_back(CODE_STX);
      foreach (body[i]) exp_q.push_back(body[i]);
      exp_q.push_back(CODE_ETX);
      body.push_back(CODE_ETX);
      exp_q.push_back(8'(ref_crc(body))); exp_q.push_back(8'(ref_crc(body) >> 8));
      msg_bytes += n; nmsg++;
    end
    in_valid = 0; in_byte = 0; in_last = 0; out_ready = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    while (src.size() > 0 || exp_q.size() > 0) begin
      @(negedge clk);
      out_ready = ($urandom % 4) != 0;
      in_valid = src.size() > 0 && ($urandom % 5) != 0;
      if (src.size() > 0) begin in_byte = src[0].b; in_last = src[0].last; end
      #1;
      if (in_valid && in_ready) begin
        `CHK(out_valid && out_byte == src[0].b, "message byte passes straight through")
        void'(src.pop_front());
      end
    end
    @(negedge clk); @(negedge clk);
    `CHK(line_bytes == msg_bytes + 6 * nmsg, $sformatf("line bytes %0d, expected %0d", line_bytes, msg_bytes + 6 * nmsg))
    `CHK(!out_valid, "quiet between messages")
    `DONE
  end
endmodule
