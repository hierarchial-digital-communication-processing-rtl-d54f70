// Testbench for tt_decoder: line streams built like a transmitter would
// (header, DLE STX, body with doubled DLEs, DLE ETX, trailer); checks the
// recovered body bytes, that header and trailer bytes are non-transparent,
// that the ETX after the lone DLE is reported as the control code, and the
// mode entry and exit pulses.
`include "tb/tb_check.svh"
module tb_tt_decoder;
  import pliu_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid, out_transparent, out_ctrl, transparent, entered, exited;
  logic [7:0] in_byte, out_byte;
  tt_decoder dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(200000)
  logic [9:0] exp_q [$];   // {transparent, ctrl, byte}
  int nent = 0, nexit = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      `CHK(exp_q.size() > 0 && {out_transparent, out_ctrl, out_byte} == exp_q[0], "decoded byte")
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
    if (entered) nent++;
    if (exited) nexit++;
  end
  task automatic send(logic [7:0] b);
    @(negedge clk); in_valid = 1; in_byte = b; @(negedge clk); in_valid = 0;
  endtask
  initial begin
    in_valid = 0; in_byte = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int m = 0; m < 40; m++) begin
      for (int i = 0; i < 3; i++) begin exp_q.push_back({2'b00, 8'h30 + 8'(i)}); send(8'h30 + 8'(i)); end
      exp_q.push_back({2'b00, CODE_DLE});   // the DLE of DLE STX is a header byte
      send(CODE_DLE); send(CODE_STX);
      for (int i = 0; i < 25; i++) begin
        logic [7:0] b;
        b = ($urandom % 4 == 0) ? CODE_DLE : 8'($urandom);
        exp_q.push_back({2'b10, b});
        send(b); if (b == CODE_DLE) send(CODE_DLE);
      end
      exp_q.push_back({2'b01, CODE_ETX});
      send(CODE_DLE); send(CODE_ETX);
      exp_q.push_back({2'b00, 8'h7E}); send(8'h7E);
    end
    repeat (3) @(negedge clk);
    `CHK(exp_q.size() == 0, "all bytes delivered")
    `CHK(nent == 40 && nexit == 40, "mode changes")
    `DONE
  end
endmodule
