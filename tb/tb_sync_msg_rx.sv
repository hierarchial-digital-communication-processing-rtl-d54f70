// Testbench for sync_msg_rx (MAXLEN reduced to 40). A random line stream of
// frames is built: noise, one or two idles (only two give sync), SOH or
// STX, printable bytes with idles sprinkled in, ETX or ETB, and the CRC-16
// checkword from a reference function, sometimes corrupted. Some frames are
// longer than MAXLEN. The expected output bytes, control flags and message
// results are worked out while the stream is built and compared in order;
// the counts of good, bad and overlong messages are checked at the end.
`include "tb/tb_check.svh"
module tb_sync_msg_rx;
  import pliu_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid, out_ctl, in_msg, msg_done, msg_ok;
  logic [7:0] in_byte, out_byte;
  sync_msg_rx #(.NSYN(2), .MAXLEN(40)) dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(200000)
  function automatic int ref_crc(input logic [7:0] m [$]);
    int r = 0;
    foreach (m[i]) begin
      r = r ^ int'(m[i]);
      repeat (8) r = (r & 1) ? ((r >> 1) ^ 'hA001) : (r >> 1);
    end
    return r;
  endfunction
  logic [7:0] line [$];
  logic [8:0] exp_out [$];       // {ctl, byte}
  bit exp_done [$];              // msg_ok per finished message
  int n_good = 0, n_bad = 0, n_long = 0, got_good = 0, got_bad = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      `CHK(exp_out.size() > 0 && {out_ctl, out_byte} == exp_out[0], $sformatf("output byte %h ctl %b, expected %h", out_byte, out_ctl, exp_out[0]))
      if (exp_out.size() > 0) void'(exp_out.pop_front());
    end
    if (msg_done) begin
      `CHK(exp_done.size() > 0 && msg_ok == exp_done[0], "message result")
      if (exp_done.size() > 0) void'(exp_done.pop_front());
      if (msg_ok) got_good++; else got_bad++;
    end
  end
  initial begin
    for (int f = 0; f < 150; f++) begin
      logic [7:0] body [$]; int kind, n; bit synced, corrupt, too_long; logic [7:0] op, cl;
      body.delete();
      kind = $urandom_range(0, 9);
      synced = kind != 0; corrupt = kind == 1 || kind == 2; too_long = kind == 3;
      op = $urandom_range(0, 1) ? CODE_SOH : CODE_STX;
      cl = $urandom_range(0, 1) ? CODE_ETX : CODE_ETB;
      line.push_back(8'h55);
      if (synced) begin line.push_back(CODE_IDLE); line.push_back(CODE_IDLE); end
      else line.push_back(CODE_IDLE);
      if (synced && $urandom_range(0, 1)) line.push_back(CODE_IDLE);   // extra idles are skipped once in sync
      line.push_back(op);
      if (synced) exp_out.push_back({1'b1, op});
      n = too_long ? 45 : 1 + $urandom_range(0, 30);
      for (int i = 0; i < n; i++) begin
        logic [7:0] b;
        b = 8'($urandom_range(8'h20, 8'h7e));
        if (op == CODE_SOH && i == n / 2) b = CODE_STX;     // SOH header then STX text
        if ($urandom_range(0, 7) == 0) line.push_back(CODE_IDLE);   // fill inside the message
        line.push_back(b); body.push_back(b);
        if (synced && !(too_long && i > 40)) exp_out.push_back({b == CODE_STX, b});
      end
      line.push_back(cl); body.push_back(cl);
      if (synced && !too_long) exp_out.push_back({1'b1, cl});
      begin
        int c;
        c = ref_crc(body);
        if (corrupt) c = c ^ (1 << $urandom_range(0, 15));
        line.push_back(8'(c)); line.push_back(8'(c >> 8));
      end
      if (synced) begin
        exp_done.push_back(!corrupt && !too_long);
        if (too_long) n_long++; else if (corrupt) n_bad++; else n_good++;
      end
    end
    in_valid = 0; in_byte = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    while (line.size() > 0) begin
      @(negedge clk);
      in_valid = ($urandom % 3) != 0;
      in_byte = in_valid ? line.pop_front() : 8'h00;
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(negedge clk);
    `CHK(exp_out.size() == 0 && exp_done.size() == 0, "all expected output seen")
    `CHK(got_good == n_good && got_bad == n_bad + n_long, $sformatf("good %0d/%0d bad %0d/%0d", got_good, n_good, got_bad, n_bad + n_long))
    `CHK(n_good > 0 && n_bad > 0 && n_long > 0, "all frame kinds generated")
    `DONE
  end
endmodule
