// ioc_chain: data block chaining for one I/O activity.
//
// The CPS queues input/output commands (IOCs), each a CPS word address and a
// block length, ahead of or during the transfer. The PLIU works through the
// current IOC one byte per transfer request, giving the address of each byte
// and counting the length down. When an IOC is expended the PLIU interrupts
// the CPS and, if another IOC is queued, continues with it at once without
// the CPS taking part. A transfer requested with no IOC left is an overrun
// (data lost) and is flagged. Up to DEPTH IOCs wait beyond the current one.
// Queuing beyond the current IOC and interrupt-per-IOC follow the design;
// the queue depth and the one-clock handshake are this design's.
module ioc_chain
  import pliu_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic      clk, rst_n,
  input  logic      ioc_push,       // CPS queues an IOC
  input  ioc_t      ioc_in,
  output logic      queue_full,
  input  logic      xfer,           // one byte transferred
  output logic      active,         // a current IOC is loaded
  output logic [CADDR_W-1:0] xfer_addr, // address for the byte now
  output logic      expended,       // one clock: an IOC finished (interrupt)
  output logic      overrun,        // one clock: transfer with no IOC
  output logic [$clog2(DEPTH+1)-1:0] queued
);
  ioc_t q [DEPTH];
  logic [$clog2(DEPTH)-1:0] rd, wr;
  ioc_t cur;
  logic take, push_ok, last;

  assign queue_full = queued == ($bits(queued))'(DEPTH);
  assign push_ok    = ioc_push && !queue_full;
  assign last       = active && xfer && cur.len == 12'd1;
  assign take       = (!active || last) && queued != 0;
  assign xfer_addr  = cur.addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= '0; wr <= '0; queued <= '0; active <= 1'b0; cur <= '0;
      expended <= 1'b0; overrun <= 1'b0;
    end else begin
      expended <= last;
      overrun  <= xfer && !active;
      if (push_ok) begin q[wr] <= ioc_in; wr <= wr + 1'b1; end
      queued <= queued + ($bits(queued))'(push_ok) - ($bits(queued))'(take);
      if (take) begin
        cur <= q[rd]; rd <= rd + 1'b1; active <= 1'b1;
      end else if (last) begin
        active <= 1'b0;
      end else if (active && xfer) begin
        cur.addr <= cur.addr + 1'b1; cur.len <= cur.len - 1'b1;
      end
    end
  end
endmodule
