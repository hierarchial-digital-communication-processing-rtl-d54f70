// bus_buffer: buffer between the PLIU internal bus and the multiplexer bus.
//
// The internal bus and the time-multiplexed bus run independently: an
// outbound register is loaded from the internal bus whenever the PLIU has a
// word to send and is driven onto the multiplexer bus only during the PLIU's
// own slot phases (mux_oe); an inbound register captures the multiplexer bus
// when the slot returns data (mux_capture) and is read on the internal bus
// afterwards. Tri-state drivers are represented by an output-enable signal
// next to each driven bus. Capture happens on the clock edge; drive is
// combinational from the registers.
module bus_buffer #(
  parameter int unsigned W = 12
) (
  input  logic         clk, rst_n,
  input  logic         out_load,        // load outbound register
  input  logic [W-1:0] out_d,
  input  logic         mux_oe,          // PLIU drives the multiplexer bus
  output logic [W-1:0] mux_out,
  output logic         mux_out_en,
  input  logic [W-1:0] mux_in,
  input  logic         mux_capture,     // capture the multiplexer bus
  input  logic         int_oe,          // internal bus reads inbound register
  output logic [W-1:0] int_out,
  output logic         int_out_en
);
  logic [W-1:0] out_q, in_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin out_q <= '0; in_q <= '0; end
    else begin
      if (out_load)    out_q <= out_d;
      if (mux_capture) in_q  <= mux_in;
    end
  end
  assign mux_out    = mux_oe ? out_q : '0;
  assign mux_out_en = mux_oe;
  assign int_out    = int_oe ? in_q : '0;
  assign int_out_en = int_oe;
endmodule
