// pdp8_pio_decode: decode of PDP-8 programmed I/O (IOT) instructions that
// control one PLIU.
//
// A PDP-8 IOT instruction is 6DDO (octal): bits 11:9 = 6, bits 8:3 the device
// code, bits 2:0 the IOP1/IOP2/IOP4 micro-operations, which the CPS issues
// as pulses in the order IOP1, IOP2, IOP4. The PLIU answers two device codes
// (DEV and DEV+1); the operations assigned to each pulse are this design's:
//   DEV   IOP1: skip if pliu_flag      IOP2: clear pliu_flag
//         IOP4: load AC into the CPS-to-PLIU mailbox register
//   DEV+1 IOP1: set DMA enable         IOP2: clear DMA enable
//         IOP4: set cps_flag (interrupt the PLIU microprocessor)
// Inputs are the instruction held on the CPS memory buffer and the three
// pulse strobes; outputs are combinational strobes.
module pdp8_pio_decode #(
  parameter logic [5:0] DEV = 6'o40
) (
  input  logic [11:0] mb,             // IOT instruction word
  input  logic        iop1, iop2, iop4,
  input  logic        pliu_flag,
  output logic        skip,
  output logic        pliu_flag_clr,
  output logic        ac_load,
  output logic        dma_en_set, dma_en_clr,
  output logic        cps_flag_set
);
  logic iot, dev0, dev1;
  assign iot  = mb[11:9] == 3'o6;
  assign dev0 = iot && mb[8:3] == DEV;
  assign dev1 = iot && mb[8:3] == DEV + 6'd1;

  assign skip          = dev0 && mb[0] && iop1 && pliu_flag;
  assign pliu_flag_clr = dev0 && mb[1] && iop2;
  assign ac_load       = dev0 && mb[2] && iop4;
  assign dma_en_set    = dev1 && mb[0] && iop1;
  assign dma_en_clr    = dev1 && mb[1] && iop2;
  assign cps_flag_set  = dev1 && mb[2] && iop4;
endmodule
