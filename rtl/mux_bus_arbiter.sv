// mux_bus_arbiter: slot allocation on the dynamic time-multiplexed bus.
//
// Time on the multiplexer bus is divided into slots; in each slot one
// requester (a PLIU or the CPS) performs one reference. A fixed-priority
// resolving network picks, at the start of a slot, the lowest-numbered
// active request; that requester owns the bus for SLOT_CLKS clocks and the
// arbiter steps the shared phase (control, address, data). A new slot can
// start the clock after the previous one ends. Requesters must drop their
// request once granted. The slot structure and priority resolution follow
// the design; fixed priority by index and three clocks per slot are this
// design's choices.
module mux_bus_arbiter
  import pliu_pkg::*;
#(
  parameter int unsigned NREQ      = 19,  // 18 PLIUs + the CPS
  parameter int unsigned SLOT_CLKS = 3
) (
  input  logic            clk, rst_n,
  input  logic [NREQ-1:0] req,
  output logic [NREQ-1:0] gnt,        // one-hot owner of the current slot
  output logic            busy,
  output phase_e          phase,
  output logic [$clog2(NREQ)-1:0] owner
);
  logic [$clog2(SLOT_CLKS+1)-1:0] cnt;
  logic [NREQ-1:0] pick;

  always_comb begin
    pick = '0;
    for (int i = NREQ-1; i >= 0; i--) if (req[i]) pick = NREQ'(1) << i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gnt <= '0; busy <= 1'b0; cnt <= '0; owner <= '0;
    end else if (!busy) begin
      if (|req) begin
        gnt <= pick; busy <= 1'b1; cnt <= '0;
        for (int i = 0; i < NREQ; i++) if (pick[i]) owner <= ($clog2(NREQ))'(i);
      end
    end else if (cnt == ($clog2(SLOT_CLKS+1))'(SLOT_CLKS-1)) begin
      gnt <= '0; busy <= 1'b0; cnt <= '0;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  assign phase = (cnt == 0) ? PH_CTRL : (cnt == 1) ? PH_ADDR : PH_DATA;

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_busy:   assert property (@(posedge clk) disable iff (!rst_n) busy == (|gnt));
endmodule
