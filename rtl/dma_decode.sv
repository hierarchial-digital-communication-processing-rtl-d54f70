// dma_decode: detects multiplexer-bus DMA references addressed to this PLIU
// and decodes their command.
//
// The CPS multiplexer addresses a PLIU in the control phase of a slot with a
// 12-bit word {target id[4:0], command[2:0], line[2:0], spare}. When the id
// matches PLIU_ID and cmd_phase is high, exactly one command strobe is raised
// and the line number (one of the eight URT channels) is passed on. Command
// codes are this design's choice:
//   0 none, 1 write data, 2 read data, 3 write control, 4 read status,
//   5 attention (interrupt the PLIU). 6..7 are reported as illegal.
// Combinational.
module dma_decode #(
  parameter logic [4:0] PLIU_ID = 5'd1
) (
  input  logic        cmd_phase,   // control phase of a CPS-initiated slot
  input  logic [11:0] bus,         // multiplexer bus word
  output logic        hit,
  output logic        wr_data, rd_data, wr_ctrl, rd_status, attention, illegal,
  output logic [2:0]  line
);
  logic [2:0] cmd;
  assign hit  = cmd_phase && bus[11:7] == PLIU_ID;
  assign cmd  = bus[6:4];
  assign line = bus[3:1];
  assign wr_data   = hit && cmd == 3'd1;
  assign rd_data   = hit && cmd == 3'd2;
  assign wr_ctrl   = hit && cmd == 3'd3;
  assign rd_status = hit && cmd == 3'd4;
  assign attention = hit && cmd == 3'd5;
  assign illegal   = hit && cmd >= 3'd6;
endmodule
