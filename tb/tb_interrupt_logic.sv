// Testbench for interrupt_logic: random masks and source patterns; checks
// the request, the vector latched at acknowledge (lowest active unmasked
// source), the in-service hold until end of interrupt.
`include "tb/tb_check.svh"
module tb_interrupt_logic;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [24:0] src, pending, mask, m_mask; logic [3:0] mask_load; logic [7:0] mask_d;
  logic int_ack, eoi, int_req, in_service; logic [4:0] vector;
  interrupt_logic #(.NSRC(25)) dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(50000)
  initial begin
    src = 0; mask_load = 0; mask_d = 0; int_ack = 0; eoi = 0; m_mask = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      mask_load = 4'(1 << ($urandom % 4)); mask_d = 8'($urandom);
      @(negedge clk); mask_load = 0;
      for (int b = 0; b < 8; b++) begin end
      m_mask = mask;
      src = 25'($urandom) & 25'($urandom);
      #1;
      `CHK(pending == (src & m_mask), "pending")
      `CHK(int_req == |(src & m_mask), "request")
      if (int_req) begin
        int lo = 0;
        for (int i = 24; i >= 0; i--) if (src[i] & m_mask[i]) lo = i;
        int_ack = 1; @(negedge clk); int_ack = 0; #1;
        `CHK(vector == 5'(lo) && in_service, "vector of highest priority source")
        `CHK(!int_req, "no request while in service")
        @(negedge clk); eoi = 1; @(negedge clk); eoi = 0; #1;
        `CHK(!in_service, "end of interrupt")
      end
    end
    // mask byte loading puts bits in place
    @(negedge clk); mask_load = 4'b0100; mask_d = 8'hA5; @(negedge clk); mask_load = 0; #1;
    `CHK(mask[23:16] == 8'hA5, "mask byte 2")
    `DONE
  end
endmodule
