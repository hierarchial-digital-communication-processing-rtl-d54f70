// Testbench for addr_decode: sweeps every 256th address and compares the
// region, selects and offsets with an independent table of the address map
// (ROM 0000-0FFF, RAM 1000-4FFF, micro-ops 5000-5FFF, relocatable
// 6000-6FFF, interlock 7000-7FFF, absolute 8000-FFFF).
`include "tb/tb_check.svh"
module tb_addr_decode;
  import pliu_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [15:0] addr; logic mem_cycle;
  space_e space;
  logic sel_rom, sel_ram, sel_uop, sel_reloc, sel_ilock, sel_abs, common_ref;
  logic [13:0] ram_addr; logic [11:0] page_off; logic [14:0] abs_addr;
  addr_decode dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(100000)
  function automatic space_e expect_space(int a);
    if (a < 'h1000) return SP_ROM;
    if (a < 'h5000) return SP_RAM;
    if (a < 'h6000) return SP_UOP;
    if (a < 'h7000) return SP_RELOC;
    if (a < 'h8000) return SP_ILOCK;
    return SP_ABS;
  endfunction
  initial begin
    for (int a = 0; a < 65536; a += 97) begin
      addr = 16'(a); mem_cycle = 1; #1;
      `CHK(space == expect_space(a), $sformatf("space of %h", a))
      `CHK(common_ref == (a >= 'h6000), $sformatf("common_ref of %h", a))
      `CHK({sel_rom,sel_ram,sel_uop,sel_reloc,sel_ilock,sel_abs} != 0 && $onehot({sel_rom,sel_ram,sel_uop,sel_reloc,sel_ilock,sel_abs}), "one select")
      if (expect_space(a) == SP_RAM) `CHK(ram_addr == 14'(a - 'h1000), $sformatf("ram offset %h", a))
      if (expect_space(a) == SP_ABS) `CHK(abs_addr == 15'(a - 'h8000), "abs offset")
      `CHK(page_off == 12'(a), "page offset")
      mem_cycle = 0; #1;
      `CHK({sel_rom,sel_ram,sel_uop,sel_reloc,sel_ilock,sel_abs,common_ref} == 0, "no select without cycle")
    end
    `DONE
  end
endmodule
