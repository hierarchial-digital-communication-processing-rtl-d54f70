// eia_line: EIA RS-232 control and data interface of one URT line, with its
// LED indicators and loopback.
//
// In normal operation the URT's data terminal ready, request to send,
// transmit data and supervisory (secondary request) outputs go to the modem,
// and the modem's data set ready, clear to send, received data, ring,
// carrier and supervisory (secondary carrier) inputs go to the URT and to
// status. In loopback the line to the modem is held idle (marking, controls
// off) and the URT's outputs are returned to its own inputs: TxD to RxD, RTS
// to CTS and carrier, DTR to DSR, secondary request to secondary carrier. A
// change in any modem status input (after synchronisation) sets a sticky
// change flag that raises an interrupt until cleared. Each interface signal
// drives an LED. Signals are active high here; the line receivers and
// drivers that convert to EIA levels are outside this module. The signal set
// and loopback follow the design; polarity and the change flag are this
// design's choices.
module eia_line (
  input  logic clk, rst_n,
  input  logic loopback,
  // URT side
  input  logic urt_dtr, urt_rts, urt_txd, urt_sup,
  output logic urt_dsr, urt_cts, urt_rxd,
  // modem side
  output logic m_dtr, m_rts, m_txd, m_sup,
  input  logic m_dsr, m_cts, m_rxd, m_ri, m_dcd, m_sup_in,
  // status
  output logic [4:0] status,        // {sup_in, dcd, ri, cts, dsr}
  output logic       change,        // sticky status-change flag
  input  logic       change_clr,
  output logic [7:0] led            // {sup_in, dcd, ri, cts, dsr, rts, dtr, txd-space}
);
  logic [4:0] raw, s1, s2;
  logic       rxd_s1, rxd_s2;

  assign m_dtr = loopback ? 1'b0 : urt_dtr;
  assign m_rts = loopback ? 1'b0 : urt_rts;
  assign m_txd = loopback ? 1'b1 : urt_txd;
  assign m_sup = loopback ? 1'b0 : urt_sup;

  assign raw = loopback ? {urt_sup, urt_rts, 1'b0, urt_rts, urt_dtr}
                        : {m_sup_in, m_dcd, m_ri, m_cts, m_dsr};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; change <= 1'b0; rxd_s1 <= 1'b1; rxd_s2 <= 1'b1;
    end else begin
      s1 <= raw; s2 <= s1;
      rxd_s1 <= loopback ? urt_txd : m_rxd; rxd_s2 <= rxd_s1;
      if (s1 != s2)        change <= 1'b1;
      else if (change_clr) change <= 1'b0;
    end
  end

  assign status  = s2;
  assign urt_dsr = s2[0];
  assign urt_cts = s2[1];
  assign urt_rxd = rxd_s2;
  assign led     = {s2[4], s2[3], s2[2], s2[1], s2[0], m_rts, m_dtr, ~m_txd};
endmodule
