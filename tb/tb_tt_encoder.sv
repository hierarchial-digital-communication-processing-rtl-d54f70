// Testbench for tt_encoder: random messages with a non-transparent header,
// transparent body rich in DLEs and a trailer, under random output stalls.
// The expected line stream (DLE STX, doubled DLEs, DLE ETX) is built
// independently and compared byte by byte.
`include "tb/tb_check.svh"
module tb_tt_encoder;
  import pliu_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, transparent; logic [1:0] in_cmd;
  logic [7:0] in_byte, out_byte; logic [15:0] stuffed;
  tt_encoder dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(200000)
  typedef struct { logic [1:0] cmd; logic [7:0] b; } item_t;
  item_t src [$]; logic [7:0] exp_q [$]; int dles = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    `CHK(exp_q.size() > 0 && out_byte == exp_q[0], "line byte")
    if (exp_q.size() > 0) void'(exp_q.pop_front());
  end
  initial begin
    in_valid = 0; in_cmd = 0; in_byte = 0; out_ready = 0;
    for (int m = 0; m < 40; m++) begin
      for (int i = 0; i < 3; i++) begin logic [7:0] b; b = 8'h41 + 8'(i); src.push_back('{0, b}); exp_q.push_back(b); end
      src.push_back('{1, 0}); exp_q.push_back(CODE_DLE); exp_q.push_back(CODE_STX);
      for (int i = 0; i < 20; i++) begin
        logic [7:0] b;
        b = ($urandom % 4 == 0) ? CODE_DLE : 8'($urandom);
        src.push_back('{0, b}); exp_q.push_back(b);
        if (b == CODE_DLE) begin exp_q.push_back(CODE_DLE); dles++; end
      end
      src.push_back('{2, 0}); exp_q.push_back(CODE_DLE); exp_q.push_back(CODE_ETX);
      src.push_back('{0, CODE_DLE}); exp_q.push_back(CODE_DLE);   // trailer DLE not doubled
    end
    repeat (2) @(posedge clk); rst_n = 1;
    while (src.size() > 0 || exp_q.size() > 0) begin
      @(negedge clk);
      out_ready = ($urandom % 4) != 0;
      in_valid = src.size() > 0;
      if (in_valid) begin in_cmd = src[0].cmd; in_byte = src[0].b; end
      #1;
      if (in_valid && in_ready) void'(src.pop_front());
      if (src.size() == 0 && exp_q.size() == 0) break;
    end
    @(negedge clk);
    `CHK(stuffed == 16'(dles), "stuffed count")
    `CHK(!transparent, "left transparent mode")
    `DONE
  end
endmodule
