// dma_addr_ctrl_mux: builds the control and address words a PLIU sends over
// the time-multiplexed bus for each common-memory reference.
//
// Every reference sends, in its slot, a control word and then the least
// significant 12 address bits. Absolute references map the 32k absolute
// region onto CPS word addresses 0..32k-1; relocatable references put the
// 12-bit offset under a 6-bit relocation page register (4k-word pages of the
// 256k-word CPS memory), loaded by the PLIU microprocessor. The control word
// is {op[1:0], 4'b0, cps_addr[17:12]}. The phase layout, page register width
// and control encoding are this design's choices. Output is combinational
// in the phase; the page register loads on the clock edge.
module dma_addr_ctrl_mux
  import pliu_pkg::*;
(
  input  logic        clk, rst_n,
  input  logic        page_load,
  input  logic [5:0]  page_d,
  input  space_e      space,
  input  logic [14:0] abs_addr,
  input  logic [11:0] page_off,
  input  mop_e        op,
  input  phase_e      phase,
  output logic [17:0] cps_addr,
  output logic [11:0] word,
  output logic [5:0]  page_q
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) page_q <= '0;
    else if (page_load) page_q <= page_d;

  always_comb begin
    unique case (space)
      SP_RELOC: cps_addr = {page_q, page_off};
      SP_ILOCK: cps_addr = {6'd0, page_off};
      default:  cps_addr = {3'd0, abs_addr};
    endcase
    unique case (phase)
      PH_CTRL: word = {op, 4'd0, cps_addr[17:12]};
      PH_ADDR: word = cps_addr[11:0];
      default: word = '0;
    endcase
  end
endmodule
