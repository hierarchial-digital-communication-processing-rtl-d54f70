// Testbench for bus_buffer: loads outbound words and captures inbound words
// at random times and checks that each bus sees the held register only while
// its enable is on.
`include "tb/tb_check.svh"
module tb_bus_buffer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic out_load, mux_oe, mux_capture, int_oe, mux_out_en, int_out_en;
  logic [11:0] out_d, mux_out, mux_in, int_out, m_out, m_in;
  bus_buffer #(.W(12)) dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(20000)
  initial begin
    {out_load, mux_oe, mux_capture, int_oe} = 0; out_d = 0; mux_in = 0; m_out = 0; m_in = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      {out_load, mux_oe, mux_capture, int_oe} = 4'($urandom);
      out_d = 12'($urandom); mux_in = 12'($urandom); #1;
      `CHK(mux_out == (mux_oe ? m_out : 12'd0) && mux_out_en == mux_oe, "mux bus drive")
      `CHK(int_out == (int_oe ? m_in : 12'd0) && int_out_en == int_oe, "internal bus drive")
      if (out_load) m_out = out_d;
      if (mux_capture) m_in = mux_in;
    end
    `DONE
  end
endmodule
