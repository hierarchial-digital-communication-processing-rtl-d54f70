// Testbench for pdp8_pio_decode: every IOT device code and operation bit
// pattern with each pulse, against the decode table of the two PLIU device
// codes; non-IOT instructions must decode to nothing.
`include "tb/tb_check.svh"
module tb_pdp8_pio_decode;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [11:0] mb; logic iop1, iop2, iop4, pliu_flag;
  logic skip, pliu_flag_clr, ac_load, dma_en_set, dma_en_clr, cps_flag_set;
  pdp8_pio_decode #(.DEV(6'o40)) dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(100000)
  initial begin
    for (int op = 0; op < 8; op++)
      for (int dev = 0; dev < 64; dev++)
        for (int p = 0; p < 3; p++)
          for (int f = 0; f < 2; f++) begin
            mb = {3'o6, 6'(dev), 3'(op)}; {iop4, iop2, iop1} = 3'(1 << p); pliu_flag = 1'(f); #1;
            `CHK(skip          == (dev == 'o40 && op[0] && p == 0 && f == 1), "skip")
            `CHK(pliu_flag_clr == (dev == 'o40 && op[1] && p == 1), "flag clear")
            `CHK(ac_load       == (dev == 'o40 && op[2] && p == 2), "ac load")
            `CHK(dma_en_set    == (dev == 'o41 && op[0] && p == 0), "dma enable set")
            `CHK(dma_en_clr    == (dev == 'o41 && op[1] && p == 1), "dma enable clear")
            `CHK(cps_flag_set  == (dev == 'o41 && op[2] && p == 2), "cps flag set")
          end
    for (int n = 0; n < 200; n++) begin
      mb = 12'($urandom); if (mb[11:9] == 3'o6) mb[11] = 0;
      {iop4, iop2, iop1} = 3'b111; pliu_flag = 1; #1;
      `CHK({skip, pliu_flag_clr, ac_load, dma_en_set, dma_en_clr, cps_flag_set} == 0, "non-IOT ignored")
    end
    `DONE
  end
endmodule
