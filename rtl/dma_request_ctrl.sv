// dma_request_ctrl: turns a microprocessor common-memory reference into one
// multiplexer-bus slot.
//
// When the address decode reports a reference to absolute, relocatable or
// interlock memory, the request flip-flop is set, provided the CPS has set
// the DMA enable, and the microprocessor is held (proc_wait) until the slot
// is over. The controller requests a slot, waits for the grant, and during
// the granted slot drives the bus in the control, address and, for writes,
// data phases; in the data phase of a read or interlock reference it
// captures the returned word. It then releases the processor and waits for
// the reference to end. A common reference made while DMA is disabled is not
// performed: access_error is raised for one clock and the processor is not
// held. The enable rule follows the design; the handshake is this design's.
module dma_request_ctrl
  import pliu_pkg::*;
(
  input  logic   clk, rst_n,
  input  logic   common_ref,     // from the address decode
  input  logic   dma_enable,
  input  logic   wr,             // processor write cycle
  input  logic   gnt,            // this PLIU owns the slot
  input  phase_e phase,
  output logic   mux_req,
  output logic   proc_wait,
  output logic   drive,          // drive the multiplexer bus this clock
  output logic   capture,        // capture returned data this clock
  output logic   done,           // one clock when the reference completes
  output logic   access_error
);
  typedef enum logic [1:0] {S_IDLE, S_REQ, S_XFER, S_DONE} state_e;
  state_e st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st <= S_IDLE;
    else unique case (st)
      S_IDLE: if (common_ref && dma_enable) st <= S_REQ;
      S_REQ:  if (gnt) st <= S_XFER;
      S_XFER: if (!gnt) st <= S_DONE;
      S_DONE: if (!common_ref) st <= S_IDLE;
      default: st <= S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) access_error <= 1'b0;
    else access_error <= st == S_IDLE && common_ref && !dma_enable && !access_error;

  assign mux_req   = st == S_REQ;
  assign proc_wait = common_ref && dma_enable && st != S_DONE;
  assign drive     = gnt && (phase != PH_DATA || wr);
  assign capture   = gnt && phase == PH_DATA && !wr;
  assign done      = st == S_XFER && !gnt;
endmodule
