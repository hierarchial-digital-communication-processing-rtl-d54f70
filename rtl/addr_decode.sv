// addr_decode: PLIU microprocessor address decode.
//
// Classifies every microprocessor address into one of six regions: 32k
// absolute common memory, 16k local RAM, 4k micro-operation decodes, 4k
// relocatable common memory, 4k interlock memory and 4k local ROM, and
// gives the offset inside the region. The six regions and their sizes are
// the design's; where each sits in the 64k space (see pliu_pkg) is this
// design's choice, with the ROM at address 0 so that restart and interrupt
// vectors live there. Purely combinational.
module addr_decode
  import pliu_pkg::*;
(
  input  logic [15:0] addr,       // microprocessor address
  input  logic        mem_cycle,  // a memory read or write is in progress
  output space_e      space,      // region of addr
  output logic        sel_rom, sel_ram, sel_uop, sel_reloc, sel_ilock, sel_abs,
  output logic        common_ref, // reference that needs the multiplexer bus
  output logic [13:0] ram_addr,   // offset in local RAM
  output logic [11:0] page_off,   // offset in a 4k region
  output logic [14:0] abs_addr    // offset in absolute common memory
);
  always_comb begin
    if (addr[15])                 space = SP_ABS;
    else if (addr[14:12] == 3'd0) space = SP_ROM;
    else if (addr[14:12] <= 3'd4) space = SP_RAM;
    else if (addr[14:12] == 3'd5) space = SP_UOP;
    else if (addr[14:12] == 3'd6) space = SP_RELOC;
    else                          space = SP_ILOCK;
  end

  assign sel_rom    = mem_cycle && space == SP_ROM;
  assign sel_ram    = mem_cycle && space == SP_RAM;
  assign sel_uop    = mem_cycle && space == SP_UOP;
  assign sel_reloc  = mem_cycle && space == SP_RELOC;
  assign sel_ilock  = mem_cycle && space == SP_ILOCK;
  assign sel_abs    = mem_cycle && space == SP_ABS;
  assign common_ref = sel_reloc || sel_ilock || sel_abs;

  assign ram_addr = addr[13:0] - RAM_BASE[13:0];
  assign page_off = addr[11:0];
  assign abs_addr = addr[14:0];
endmodule
