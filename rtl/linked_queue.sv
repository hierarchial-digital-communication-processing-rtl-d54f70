// linked_queue: interlock-free queue between two asynchronously executing
// processors.
//
// Processor A stuffs entries at the tail; processor B fetches them at the
// head. Each pointer is written by one side only, so neither side ever
// waits for a lock: A moves only the tail, B moves only the head, and each
// reads the other's pointer to see whether the queue is full or empty. Two
// of these, one in each direction, carry all traffic between the CPS and a
// PLIU. The one-writer-per-pointer scheme follows the design; the ring of
// DEPTH entries in place of a linked list in common memory is this design's
// simplification. Push and pop take effect on the clock edge; head_data is
// the entry at the head.
module linked_queue #(
  parameter int unsigned W     = 12,
  parameter int unsigned DEPTH = 16
) (
  input  logic         clk, rst_n,
  input  logic         push,
  input  logic [W-1:0] push_data,
  output logic         full,
  input  logic         pop,
  output logic [W-1:0] head_data,
  output logic         empty,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned PW = $clog2(DEPTH);
  logic [W-1:0] mem [DEPTH];
  logic [PW:0] head, tail;   // one extra bit tells full from empty

  assign count = tail - head;
  assign empty = head == tail;
  assign full  = count == ($bits(count))'(DEPTH);
  assign head_data = mem[head[PW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tail <= '0;
    else if (push && !full) tail <= tail + 1'b1;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) head <= '0;
    else if (pop && !empty) head <= head + 1'b1;
  end
  always_ff @(posedge clk)
    if (push && !full) mem[tail[PW-1:0]] <= push_data;

  a_count: assert property (@(posedge clk) disable iff (!rst_n) count <= ($bits(count))'(DEPTH));
endmodule
