// failsoft_monitor: timing-window fault detector for one CPS set.
//
// Running at low priority, the CPS set's software must produce an enable
// pulse inside a prescribed time window after the previous one. Time is
// counted in ticks (a tick every TICK_DIV clocks). An enable that comes
// sooner than WIN_MIN ticks after the previous one is an early fault; no
// enable by WIN_MAX ticks is a missing-enable fault (the window then
// restarts). Each fault sets the status cause and, if the interrupt is
// selected, raises an interrupt to the other CPS set. N_FAULT consecutive
// faulty windows declare the set failed, which asks the partner set to take
// over its multiplexer (takeover); M_GOOD consecutive correct windows
// declare it running again, which is also how a set is accepted at start
// up. Takeover has three causes, as the design lists them: manual (an
// operator takes the set off line), self-imposed (the set's own checks
// found a problem) and externally imposed (this window monitor declared it
// failed). takeover is the OR of the three, combinational from manual and
// self_fail and registered from the window logic. The window and the
// n-faults/m-good rule follow the design; the tick counting, the level
// inputs for the first two causes and the default numbers are this
// design's.
module failsoft_monitor #(
  parameter int unsigned TICK_DIV = 1000,
  parameter int unsigned WIN_MIN  = 8,
  parameter int unsigned WIN_MAX  = 16,
  parameter int unsigned N_FAULT  = 3,
  parameter int unsigned M_GOOD   = 3
) (
  input  logic       clk, rst_n,
  input  logic       enable,         // enable pulse from the monitored set
  input  logic       int_select,     // interrupt on fault selected
  input  logic       int_clr,
  input  logic       manual,         // operator takes the set off line (level)
  input  logic       self_fail,      // the set reports its own failure (level)
  output logic       fault_int,
  output logic [1:0] cause,          // bit0: early enable, bit1: missing enable
  output logic       failed,         // set declared failed (starts failed)
  output logic       takeover,       // partner takes over this set's multiplexer
  output logic [7:0] fault_count     // total faults seen (saturating)
);
  logic [$clog2(TICK_DIV+1)-1:0] pre;
  logic [$clog2(WIN_MAX+2)-1:0]  t;
  logic [$clog2(N_FAULT+1)-1:0]  nf;
  logic [$clog2(M_GOOD+1)-1:0]   ng;
  logic tick, early, late, good;

  assign tick  = pre == 0;
  assign early = enable && t < ($bits(t))'(WIN_MIN);
  assign good  = enable && !early;
  assign late  = !enable && tick && t == ($bits(t))'(WIN_MAX);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre <= '0; t <= '0; nf <= '0; ng <= '0; failed <= 1'b1;
      fault_int <= 1'b0; cause <= '0; fault_count <= '0;
    end else begin
      pre <= tick ? ($bits(pre))'(TICK_DIV-1) : pre - 1'b1;
      if (enable || late) t <= '0;
      else if (tick)      t <= t + 1'b1;

      if (early || late) begin
        cause <= {late, early};
        if (int_select) fault_int <= 1'b1;
        if (fault_count != 8'hFF) fault_count <= fault_count + 1'b1;
        ng <= '0;
        if (nf == ($bits(nf))'(N_FAULT-1)) begin failed <= 1'b1; nf <= '0; end
        else if (!failed) nf <= nf + 1'b1;
      end else if (good) begin
        nf <= '0;
        if (ng == ($bits(ng))'(M_GOOD-1)) begin failed <= 1'b0; ng <= '0; end
        else if (failed) ng <= ng + 1'b1;
      end
      if (int_clr && !(early || late)) fault_int <= 1'b0;
    end
  end
  assign takeover = failed || manual || self_fail;
endmodule
