// local_memory: the PLIU's local slave RAM, 16k words of 8 bits.
//
// Built, as in the design, from four banks of 4k words (each bank a row of
// eight 4k x 1 static RAM chips, one per data bit). Address bits 13:12 choose
// the bank, bits 11:0 the word in it. A write is performed on the clock edge
// while cs and we are high; reads are combinational, as for a static RAM.
// Contents are not cleared at reset.
module local_memory #(
  parameter int unsigned BANKS      = 4,
  parameter int unsigned BANK_WORDS = 4096
) (
  input  logic        clk,
  input  logic        cs, we,
  input  logic [$clog2(BANKS*BANK_WORDS)-1:0] addr,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata
);
  logic [7:0] mem [BANKS*BANK_WORDS];
  always_ff @(posedge clk)
    if (cs && we) mem[addr] <= wdata;
  assign rdata = cs ? mem[addr] : 8'h00;
endmodule
