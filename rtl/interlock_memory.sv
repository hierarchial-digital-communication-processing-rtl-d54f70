// interlock_memory: interlock cells shared by the CPS and all PLIUs.
//
// Each of CELLS cells holds an interlock bit and the identifier of the
// processor that last changed it. Two operations:
//   test (conditional destructive read): if the bit is clear, set it and
//       record the requester's identifier; either way return the bit and the
//       identifier now held, so the requester owns the interlock when the
//       returned identifier is its own;
//   reset: clear the bit and record the requester's identifier.
// One operation is accepted per clock; the reply appears the next clock
// with rsp_valid. All bits clear at reset. Operation semantics follow the
// design; the reply timing is this design's choice.
module interlock_memory
  import pliu_pkg::*;
#(
  parameter int unsigned CELLS = 4096
) (
  input  logic                     clk, rst_n,
  input  logic                     req,
  input  logic                     op_reset,  // 0: test, 1: reset
  input  logic [$clog2(CELLS)-1:0] addr,
  input  logic [ID_W-1:0]          id,
  output logic                     rsp_valid,
  output logic                     rsp_bit,
  output logic [ID_W-1:0]          rsp_id
);
  logic [CELLS-1:0] lock;
  logic [ID_W-1:0]  owner [CELLS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lock <= '0; rsp_valid <= 1'b0; rsp_bit <= 1'b0; rsp_id <= '0;
    end else begin
      rsp_valid <= req;
      if (req) begin
        if (op_reset) begin
          lock[addr] <= 1'b0; rsp_bit <= 1'b0; rsp_id <= id;
        end else if (!lock[addr]) begin
          lock[addr] <= 1'b1; rsp_bit <= 1'b1; rsp_id <= id;
        end else begin
          rsp_bit <= 1'b1; rsp_id <= owner[addr];
        end
      end
    end
  end

  always_ff @(posedge clk)
    if (req && (op_reset || !lock[addr])) owner[addr] <= id;
endmodule
