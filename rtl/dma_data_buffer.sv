// dma_data_buffer: joins the 8-bit PLIU data path to the 12-bit CPS word.
//
// The low 8 bits of each word sent to common memory come from the
// microprocessor data bus; the high 4 bits come from a register the
// microprocessor loads beforehand. On a read the low 8 bits are returned to
// the microprocessor and the high 4 bits are kept in a register it can read
// afterwards. The 4+8 split follows the design; using registers for the high
// bits is this design's choice. Registers load on the clock edge.
module dma_data_buffer (
  input  logic        clk, rst_n,
  input  logic        hi_load,        // microprocessor loads high 4 bits
  input  logic [3:0]  hi_d,
  input  logic [7:0]  proc_wdata,
  output logic [11:0] wr_word,        // word sent on a write reference
  input  logic        rd_capture,     // read data is on the bus
  input  logic [11:0] rd_word,
  output logic [7:0]  rd_lo,          // low 8 bits of the last read
  output logic [3:0]  rd_hi,          // high 4 bits of the last read
  output logic [3:0]  wr_hi
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin wr_hi <= '0; rd_hi <= '0; rd_lo <= '0; end
    else begin
      if (hi_load)    wr_hi <= hi_d;
      if (rd_capture) {rd_hi, rd_lo} <= rd_word;
    end
  end
  assign wr_word = {wr_hi, proc_wdata};
endmodule
