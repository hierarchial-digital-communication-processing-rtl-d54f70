// microop_decode: decode of the 4k micro-operation address region.
//
// A reference into the micro-operation region does not touch memory; its
// address bits name operations. The address is split into three mutually
// independent fields, all enabled by the micro-operation select, so that
// one reference can perform one operation of each set at once:
//   addr[3:0]  set A: set (on a write) or reset (on a read) flip-flop n
//   addr[7:4]  set B: test flip-flop n (result returned on data bit 0)
//   addr[11:8] set C: load register n (write) or read register n (read)
// Field value 0 means "no operation" in that set. The three-set grouping
// follows the design; the field layout and the read/write meaning are this
// design's choice. Outputs are one-hot strobes, valid while sel is high.
module microop_decode (
  input  logic        sel,      // micro-operation region selected
  input  logic        wr,       // write cycle (else read)
  input  logic [11:0] addr,     // offset in the region
  output logic [15:1] flop_set,
  output logic [15:1] flop_reset,
  output logic [15:1] test_sel,
  output logic [15:1] reg_load,
  output logic [15:1] reg_read
);
  always_comb begin
    flop_set = '0; flop_reset = '0; test_sel = '0; reg_load = '0; reg_read = '0;
    if (sel) begin
      for (int i = 1; i < 16; i++) begin
        if (addr[3:0]  == 4'(i)) begin flop_set[i] = wr;  flop_reset[i] = !wr; end
        if (addr[7:4]  == 4'(i)) test_sel[i] = 1'b1;
        if (addr[11:8] == 4'(i)) begin reg_load[i] = wr; reg_read[i] = !wr; end
      end
    end
  end
endmodule
