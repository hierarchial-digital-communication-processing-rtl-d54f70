// tdm_output_mux: builds the time-multiplexed output stream from per-channel
// byte queues.
//
// The CPS places only real data in a byte queue per channel. On every
// period the multiplexer sends the synchronous idle code and then, for each
// of NCH channels in turn, the next byte of that channel's queue, or an
// idle code if the queue is empty; the CPS therefore never supplies idles.
// A byte leaves on each clock that out_ready is high (the transmitter takes
// it). Per-channel queues of QDEPTH bytes; a push to a full queue is refused
// (push_ok low). The period and the idle filling follow the design; the
// queue depth and handshake are this design's.
module tdm_output_mux
  import pliu_pkg::*;
#(
  parameter int unsigned NCH    = 12,
  parameter int unsigned QDEPTH = 8
) (
  input  logic       clk, rst_n,
  input  logic       push,
  input  logic [3:0] push_chan,
  input  logic [7:0] push_byte,
  output logic       push_ok,
  input  logic       out_ready,
  output logic [7:0] out_byte,
  output logic       out_sync,       // this byte is the period's sync idle
  output logic [3:0] out_chan,       // channel of a non-sync byte
  output logic       out_is_fill,    // idle inserted for an empty queue
  output logic [15:0] fill_count
);
  localparam int unsigned PW = $clog2(QDEPTH);
  logic [7:0] q [NCH][QDEPTH];
  logic [PW:0] hd [NCH];
  logic [PW:0] tl [NCH];
  logic [3:0]  slot;                 // 0 sync, 1..NCH channels
  logic [NCH-1:0] empty, full;
  logic [3:0] ch;

  always_comb
    for (int i = 0; i < NCH; i++) begin
      empty[i] = hd[i] == tl[i];
      full[i]  = (tl[i] - hd[i]) == (PW+1)'(QDEPTH);
    end

  assign ch          = slot - 4'd1;
  assign push_ok     = push && push_chan < 4'(NCH) && !full[push_chan];
  assign out_sync    = slot == 0;
  assign out_chan    = out_sync ? 4'd0 : ch;
  assign out_is_fill = !out_sync && empty[ch];
  assign out_byte    = (out_sync || out_is_fill) ? CODE_IDLE : q[ch][hd[ch][PW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot <= '0; fill_count <= '0;
      for (int i = 0; i < NCH; i++) begin hd[i] <= '0; tl[i] <= '0; end
    end else begin
      if (push_ok) tl[push_chan] <= tl[push_chan] + 1'b1;
      if (out_ready) begin
        slot <= (slot == 4'(NCH)) ? 4'd0 : slot + 4'd1;
        if (!out_sync && !empty[ch]) hd[ch] <= hd[ch] + 1'b1;
        if (out_is_fill) fill_count <= fill_count + 1'b1;
      end
    end
  end
  always_ff @(posedge clk)
    if (push_ok) q[push_chan][tl[push_chan][PW-1:0]] <= push_byte;
endmodule
