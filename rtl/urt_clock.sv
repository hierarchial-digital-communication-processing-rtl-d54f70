// urt_clock: serial clock generation for the eight URTs of a PLIU.
//
// Each line's transmit and receive clocks come from one of three sources,
// chosen per line: asynchronous mode uses a shared programmable baud-rate
// generator (the URT samples at 16 times the bit rate, so the generator
// runs at that rate); synchronous mode uses the transmit and receive clocks
// supplied by the modem on the EIA interface, synchronised and edge
// detected; loopback mode feeds the internal generator to both transmitter
// and receiver. The three modes follow the design; the divisor register and
// the use of one-clock enable pulses in place of separate clock nets are
// this design's. A tick is a one-clock pulse every DIV+1 clocks.
module urt_clock
  import pliu_pkg::*;
#(
  parameter int unsigned NLINES = 8,
  parameter int unsigned DIV_W  = 12
) (
  input  logic              clk, rst_n,
  input  logic              div_load,
  input  logic [DIV_W-1:0]  div_d,
  input  clk_mode_e         mode [NLINES],
  input  logic [NLINES-1:0] ext_txc, ext_rxc,   // modem clocks
  output logic [NLINES-1:0] txc_en, rxc_en,
  output logic              tick
);
  logic [DIV_W-1:0] div_q, cnt;
  logic [NLINES-1:0] txs1, txs2, txs3, rxs1, rxs2, rxs3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_q <= '0; cnt <= '0; tick <= 1'b0;
      txs1 <= '0; txs2 <= '0; txs3 <= '0; rxs1 <= '0; rxs2 <= '0; rxs3 <= '0;
    end else begin
      if (div_load) begin div_q <= div_d; cnt <= div_d; tick <= 1'b0; end
      else if (cnt == 0) begin cnt <= div_q; tick <= 1'b1; end
      else begin cnt <= cnt - 1'b1; tick <= 1'b0; end
      {txs3, txs2, txs1} <= {txs2, txs1, ext_txc};
      {rxs3, rxs2, rxs1} <= {rxs2, rxs1, ext_rxc};
    end
  end

  always_comb begin
    for (int i = 0; i < NLINES; i++) begin
      unique case (mode[i])
        CLK_SYNC: begin txc_en[i] = txs2[i] & ~txs3[i]; rxc_en[i] = rxs2[i] & ~rxs3[i]; end
        CLK_ASYNC, CLK_LOOPBACK: begin txc_en[i] = tick; rxc_en[i] = tick; end
        default:  begin txc_en[i] = 1'b0; rxc_en[i] = 1'b0; end
      endcase
    end
  end
endmodule
